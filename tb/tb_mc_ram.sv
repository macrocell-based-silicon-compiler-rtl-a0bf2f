// tb_mc_ram: checks the data memory: random writes and reads of the
// read/write words against a testbench copy, read-only words that return
// their constants and ignore writes, and clearing by reset.
module tb_mc_ram;
  import mc_pkg::*;
  localparam int W = 16, DEPTH = 64;
  localparam logic [DEPTH-1:0] RO = 64'hF000_0000_0000_0101;
  function automatic logic [DEPTH-1:0][W-1:0] consts();
    logic [DEPTH-1:0][W-1:0] c;
    for (int i = 0; i < DEPTH; i++) c[i] = W'(i * 1234 + 77);
    return c;
  endfunction
  logic clk = 0, rst = 1, we = 0;
  logic [ADDR_W-1:0] addr = '0;
  logic [W-1:0] wdata = '0, rdata;
  logic [W-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  mc_ram #(.W(W), .DEPTH(DEPTH), .RO_MASK(RO), .CONSTS(consts())) dut (.clk, .rst, .addr, .we, .wdata, .rdata);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  function automatic logic [W-1:0] expect_at(input int a);
    return RO[a] ? W'(a * 1234 + 77) : model[a];
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    for (int a = 0; a < DEPTH; a++) model[a] = '0;
    for (int a = 0; a < DEPTH; a++) begin addr = ADDR_W'(a); #1 check(rdata == expect_at(a), "after reset"); end
    for (int k = 0; k < 400; k++) begin
      addr = ADDR_W'($urandom_range(0, DEPTH - 1)); we = $urandom_range(0, 1); wdata = W'($urandom);
      #1 check(rdata == expect_at(addr), $sformatf("read %0d", addr));
      @(negedge clk);
      if (we && !RO[addr]) model[addr] = wdata;
    end
    we = 0;
    rst = 1; @(negedge clk); rst = 0;
    for (int a = 0; a < DEPTH; a++) model[a] = '0;
    for (int a = 0; a < DEPTH; a++) begin addr = ADDR_W'(a); #1 check(rdata == expect_at(a), "reset clears"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (1000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
