// tb_test_mux: checks that the selected kernel source reaches the output.
module tb_test_mux;
  import vcp_pkg::*;
  import vcp_tb_pkg::*;

  logic sel, lv, tv, ov;
  chunk_kernels_t lk, tk, ok;
  int checks = 0, failures = 0;

  test_mux dut (.sel, .live_valid(lv), .live_kernels(lk), .test_valid(tv),
                .test_kernels(tk), .out_valid(ov), .out_kernels(ok));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      sel = $urandom_range(0, 1);
      lv = $urandom_range(0, 1); tv = $urandom_range(0, 1);
      for (int k = 0; k < CHUNK_W; k++) begin lk[k] = rand_kernel(); tk[k] = rand_kernel(); end
      #1;
      checks++;
      if (ov !== (sel ? tv : lv) || ok !== (sel ? tk : lk)) begin
        failures++;
        $display("mismatch at %0d sel=%0b", i, sel);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
