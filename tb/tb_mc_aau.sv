// tb_mc_aau: checks the address arithmetic unit: direct addresses, IX = -1 in
// the main program and 0,1,2.. in the subprogram iterations, IY stepping once
// per sample modulo IY_MOD, pointer load and add, and wrap-around modulo the
// memory depth. Expected addresses are computed here. A second instance built
// without IX, IY and pointer hardware sees the same stimulus; every clock it
// must address like the direct mode, and report IX as -1 or 0 only.
module tb_mc_aau;
  import mc_pkg::*;
  localparam int DEPTH = 64, IY_MOD = 4;
  logic clk = 0, rst = 1, sample = 0, pc_active = 0, iter_start = 0;
  logic [ADDR_W-1:0] field = '0, ea, iy;
  amode_e amode = AM_DIR;
  ptr_op_e ptr_op = PTR_HOLD;
  logic in_main;
  logic signed [8:0] ix;
  int checks = 0, failures = 0;

  mc_aau #(.DEPTH(DEPTH), .IY_MOD(IY_MOD)) dut (.clk, .rst, .sample, .pc_active, .iter_start, .field, .amode, .ptr_op, .ea, .in_main, .ix, .iy);
  logic [ADDR_W-1:0] ea_l, iy_l;
  logic in_main_l;
  logic signed [8:0] ix_l;
  mc_aau #(.DEPTH(DEPTH), .IY_MOD(IY_MOD), .USE_IX(1'b0), .USE_IY(1'b0), .USE_PTR(1'b0)) lean (
    .clk, .rst, .sample, .pc_active, .iter_start, .field, .amode, .ptr_op, .ea(ea_l), .in_main(in_main_l), .ix(ix_l), .iy(iy_l));
  always #5 clk = ~clk;
  always @(posedge clk) if (!rst)
    check(ea_l == field && in_main_l == pc_active && ix_l == (pc_active ? -9'sd1 : 9'sd0) && iy_l == ADDR_W'(IY_MOD - 1),
          $sformatf("lean AAU: ea %0d field %0d ix %0d", ea_l, field, ix_l));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int ptr;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int s = 0; s < 6; s++) begin
      sample = 1; @(negedge clk); sample = 0;
      // main program
      pc_active = 1;
      for (int k = 0; k < 3; k++) begin
        field = ADDR_W'($urandom_range(0, 63));
        amode = AM_DIR; #1 check(ea == field, "direct");
        amode = AM_IX;  #1 check(ea == ADDR_W'((int'(field) + 63) % 64) && in_main, "IX = -1 in main");
        amode = AM_IY;  #1 check(ea == ADDR_W'((int'(field) + s % IY_MOD) % 64), $sformatf("IY sample %0d: ea %0d field %0d", s, ea, field));
        @(negedge clk);
      end
      pc_active = 0;
      // four subprogram iterations of two cycles
      for (int it = 0; it < 4; it++)
        for (int a = 0; a < 2; a++) begin
          iter_start = (a == 0);
          field = 6'd10; amode = AM_IX;
          #1 check(ea == ADDR_W'(10 + it) && !in_main && ix == 9'(it), $sformatf("IX iteration %0d: ea %0d", it, ea));
          @(negedge clk);
        end
      iter_start = 0;
    end
    // pointer
    amode = AM_DIR; field = 6'd50; ptr_op = PTR_LOAD; @(negedge clk);
    ptr = 50;
    for (int k = 0; k < 8; k++) begin
      field = 6'd7; ptr_op = PTR_ADD; amode = AM_PTR;
      #1 check(ea == ADDR_W'((ptr + 7) % 64), $sformatf("pointer %0d: ea %0d", ptr, ea));
      @(negedge clk);
      ptr = (ptr + 7) % 64;
    end
    ptr_op = PTR_HOLD; field = 6'd0; #1 check(ea == ADDR_W'(ptr), "pointer hold");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (1000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
