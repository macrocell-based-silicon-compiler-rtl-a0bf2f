// tb_mc_fsm: checks the PLA state machine with its default personality
// (s0 <= ACC<0, s1 <= ACC>=0, s2 <= saturated or s2, s3 <= ACC==0): random
// conditions, steps only when commanded, and the conditional-write enable
// picked by cw_bit.
module tb_mc_fsm;
  import mc_pkg::*;
  logic clk = 0, rst = 1, step = 0;
  logic [COND_W-1:0] cond = '0;
  logic [1:0] ctl = '0, cw_bit = '0;
  logic [3:0] state, m;
  logic cw_en;
  int checks = 0, failures = 0;

  mc_fsm dut (.clk, .rst, .cond, .step, .ctl, .cw_bit, .state, .cw_en);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0; m = '0;
    for (int k = 0; k < 200; k++) begin
      cond = COND_W'($urandom); step = ($urandom_range(0, 3) != 0); ctl = 2'($urandom);
      @(negedge clk);
      if (step) m = {cond[C_ZERO], cond[C_SAT] | m[2], !cond[C_NEG], cond[C_NEG]};
      check(state == m, $sformatf("state %b want %b", state, m));
      for (int b = 0; b < 4; b++) begin
        cw_bit = 2'(b); #1 check(cw_en == m[b], "cw_en");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (1000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
