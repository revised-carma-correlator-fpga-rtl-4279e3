// tb_phase_rot: checks downconversion plus phase correction against
// x_k * i^k * e^{i phi} computed here in real arithmetic from the angle
// (cos/sin given at 18-bit precision, 2^17 scale), the 12-bit rounding with
// four fraction bits, and the demodulation negation.
module tb_phase_rot;
  logic clk = 0, rst = 1;
  always #4 clk = ~clk;
  logic [7:0][7:0] din;
  logic [17:0] cos_phi, sin_phi;
  logic negate;
  logic [7:0][11:0] re, im;
  int checks = 0, failures = 0;
  phase_rot dut (.*);
  function automatic real fabs(input real v); return v < 0.0 ? -v : v; endfunction
  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    repeat (2) @(negedge clk); rst = 0;
    for (int n = 0; n < 200; n++) begin
      real phi, c, s, er, ei;
      int ic, is;
      phi = 6.283185307179586 * real'($urandom_range(0, 65535)) / 65536.0;
      ic = $rtoi($floor(131071.0 * $cos(phi) + 0.5)); is = $rtoi($floor(131071.0 * $sin(phi) + 0.5));
      cos_phi = 18'(ic); sin_phi = 18'(is);
      c = real'(ic) / 131072.0; s = real'(is) / 131072.0;
      negate = 1'($urandom);
      for (int k = 0; k < 8; k++) din[k] = 8'($urandom);
      @(negedge clk);
      for (int k = 0; k < 8; k++) begin
        real x, rr, ri;
        int gr, gi;
        x = real'($signed(din[k]));
        // (x i^k)(c + i s)
        case (k % 4)
          0: begin rr = x * c;  ri = x * s;  end
          1: begin rr = -x * s; ri = x * c;  end
          2: begin rr = -x * c; ri = -x * s; end
          default: begin rr = x * s; ri = -x * c; end
        endcase
        if (negate) begin rr = -rr; ri = -ri; end
        gr = $signed(re[k]); gi = $signed(im[k]);
        // 4 fraction bits: allow the rounding step
        chk(fabs(real'(gr) / 16.0 - rr) <= 0.07 || (gr == 2047 && rr > 127.9) || (gr == -2048 && rr < -127.9),
            $sformatf("re k=%0d got %0d exp %f", k, gr, rr * 16.0));
        chk(fabs(real'(gi) / 16.0 - ri) <= 0.07 || (gi == 2047 && ri > 127.9) || (gi == -2048 && ri < -127.9),
            $sformatf("im k=%0d got %0d exp %f", k, gi, ri * 16.0));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
