// tb_mc_pc: checks the program counter. After each sample strobe the PC must
// step through addresses 0..MAIN_LEN-1, one per clock, with 'start' on the
// first and 'done' on the last, then stay idle until the next strobe; reset
// stops it. Expected addresses are counted in the testbench.
module tb_mc_pc;
  localparam int MAIN_LEN = 16, PAW = 8;
  logic clk = 0, rst = 1, sample = 0;
  logic active, start, done;
  logic [PAW-1:0] addr;
  int checks = 0, failures = 0;

  mc_pc #(.MAIN_LEN(MAIN_LEN), .PAW(PAW)) dut (.clk, .rst, .sample, .active, .start, .done, .addr);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk); check(!active, "idle after reset");
    for (int s = 0; s < 3; s++) begin
      sample = 1; @(negedge clk); sample = 0;
      for (int i = 0; i < MAIN_LEN; i++) begin
        check(active && addr == PAW'(i), $sformatf("addr %0d got %0d active %0b", i, addr, active));
        check(start == (i == 0), "start pulse");
        check(done == (i == MAIN_LEN - 1), "done pulse");
        @(negedge clk);
      end
      repeat (5) begin check(!active && !done, "idle after program"); @(negedge clk); end
    end
    sample = 1; @(negedge clk); sample = 0;
    repeat (3) @(negedge clk);
    rst = 1; @(negedge clk); rst = 0;
    check(!active, "reset stops the PC");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (500) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
