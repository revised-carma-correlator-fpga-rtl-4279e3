// tb_corl_status: checks the status word: active-cycle counter, sticky
// overflow flags (only while active), the UNLOCK_WARNING threshold of 8
// unlocked cycles (8 do not set the flag, 9 do), error and done, and clear.
module tb_corl_status;
  logic clk = 0, rst = 1;
  always #4 clk = ~clk;
  logic clear = 0, active = 0, front_locked = 1, dig_locked = 1, err_set = 0, done_set = 0, done_clr = 0;
  logic [3:0] ovf = 0;
  logic [31:0] status;
  int checks = 0, failures = 0;
  corl_status dut (.*);
  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s %h", s, status); end
  endtask
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    repeat (2) @(negedge clk); rst = 0;
    ovf = 4'b0010; @(negedge clk); ovf = 0;
    chk(status[7:4] == 0, "overflow ignored while inactive");
    active = 1; repeat (37) @(negedge clk);
    chk(status[30:8] == 37, "active counter");
    front_locked = 0; repeat (8) @(negedge clk); front_locked = 1; @(negedge clk); @(negedge clk);
    chk(status[3] == 0, "8 unlocked cycles tolerated");
    dig_locked = 0; repeat (9) @(negedge clk); dig_locked = 1; @(negedge clk); @(negedge clk);
    chk(status[2] == 1 && status[3] == 0, "9 unlocked cycles flagged");
    ovf = 4'b1000; @(negedge clk); ovf = 0; @(negedge clk);
    chk(status[7:4] == 4'b1000, "sticky overflow");
    err_set = 1; @(negedge clk); err_set = 0; done_set = 1; @(negedge clk); done_set = 0;
    chk(status[1:0] == 2'b11, "error and done");
    done_clr = 1; @(negedge clk); done_clr = 0;
    chk(status[0] == 0 && status[1] == 1, "done cleared, error sticky");
    active = 0; clear = 1; @(negedge clk); clear = 0;
    chk(status == 0, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
