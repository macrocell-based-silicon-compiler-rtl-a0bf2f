// tb_mc_rom: checks the microcode ROM. Word i of the test image is a
// pseudo-random function of i; the ROM must return word pc_addr while the PC
// is active, word MAIN_LEN + spc_addr while the subprogram counter is active,
// and the NOP word otherwise.
module tb_mc_rom;
  import mc_pkg::*;
  localparam int DEPTH = 256, PAW = 8, MAIN_LEN = 100;
  typedef logic [DEPTH-1:0][CW_W-1:0] img_t;

  function automatic logic [CW_W-1:0] pat(input int i);
    return CW_W'({i * 32'h9e37_79b9, i * 32'h85eb_ca6b}) ^ CW_W'(i + 1);
  endfunction
  function automatic img_t image();
    img_t m;
    for (int i = 0; i < DEPTH; i++) m[i] = pat(i);
    return m;
  endfunction

  logic pc_active = 0, spc_active = 0;
  logic [PAW-1:0] pc_addr = '0, spc_addr = '0;
  ctrl_t cw;
  int checks = 0, failures = 0;

  mc_rom #(.DEPTH(DEPTH), .PAW(PAW), .MAIN_LEN(MAIN_LEN), .PROGRAM(image())) dut (.pc_active, .pc_addr, .spc_active, .spc_addr, .cw);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #1 check(cw == CW_NOP, "NOP when idle");
    for (int i = 0; i < MAIN_LEN; i++) begin
      pc_active = 1; pc_addr = PAW'(i); #1;
      check(cw == pat(i), $sformatf("main word %0d", i));
    end
    pc_active = 0;
    for (int i = 0; i < DEPTH - MAIN_LEN; i++) begin
      spc_active = 1; spc_addr = PAW'(i); #1;
      check(cw == pat(MAIN_LEN + i), $sformatf("sub word %0d", i));
    end
    spc_active = 0; #1 check(cw == CW_NOP, "NOP after program");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
