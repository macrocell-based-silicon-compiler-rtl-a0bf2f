// tb_mc_spc: checks the subprogram counter. After 'go' it must run N_ITER
// iterations of SUB_LEN addresses, flag the first cycle of each iteration and
// then stop; the total run is SUB_LEN*N_ITER cycles.
module tb_mc_spc;
  localparam int SUB_LEN = 8, N_ITER = 4, PAW = 8;
  logic clk = 0, rst = 1, go = 0;
  logic active, iter_start;
  logic [PAW-1:0] addr;
  logic [7:0] iter;
  int checks = 0, failures = 0;

  mc_spc #(.SUB_LEN(SUB_LEN), .N_ITER(N_ITER), .PAW(PAW)) dut (.clk, .rst, .go, .active, .iter_start, .addr, .iter);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk); check(!active, "idle after reset");
    for (int r = 0; r < 2; r++) begin
      go = 1; @(negedge clk); go = 0;
      for (int it = 0; it < N_ITER; it++)
        for (int a = 0; a < SUB_LEN; a++) begin
          check(active && addr == PAW'(a) && iter == 8'(it), $sformatf("iter %0d addr %0d: got %0d/%0d", it, a, iter, addr));
          check(iter_start == (a == 0), "iteration start");
          @(negedge clk);
        end
      repeat (4) begin check(!active && !iter_start, "stopped after last iteration"); @(negedge clk); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (500) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
