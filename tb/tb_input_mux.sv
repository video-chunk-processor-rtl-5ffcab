// tb_input_mux: checks that the selected source appears one clock later and
// that reset clears the output strobes.
module tb_input_mux;
  import vcp_pkg::*;

  logic clk = 0, rst = 1, sel = 0;
  logic s0v, s0s, s1v, s1s, ov, os;
  pixel_t s0p, s1p, op;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  input_mux dut (.clk, .rst, .sel, .src0_vsync(s0s), .src0_valid(s0v), .src0_pix(s0p),
                 .src1_vsync(s1s), .src1_valid(s1v), .src1_pix(s1p),
                 .out_vsync(os), .out_valid(ov), .out_pix(op));

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic ev, es; pixel_t ep;
    {s0v, s0s, s1v, s1s} = '0; s0p = '1; s1p = '1;
    repeat (2) @(posedge clk);
    #1;
    checks++; if (ov !== 1'b0 || os !== 1'b0) begin failures++; $display("reset not clearing"); end
    rst = 0;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      sel = $urandom_range(0, 1);
      s0v = $urandom_range(0, 1); s0s = $urandom_range(0, 1); s0p = pixel_t'($urandom);
      s1v = $urandom_range(0, 1); s1s = $urandom_range(0, 1); s1p = pixel_t'($urandom);
      ev = sel ? s1v : s0v; es = sel ? s1s : s0s; ep = sel ? s1p : s0p;
      @(posedge clk); #1;
      checks++;
      if (ov !== ev || os !== es || op !== ep) begin
        failures++;
        $display("mismatch i=%0d sel=%0b got %0b %0b %h exp %0b %0b %h", i, sel, ov, os, op, ev, es, ep);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
