// mc_rom: microcode read-only memory of one macrocell processor.
//
// Holds the processor's horizontal control words: the main program at
// addresses 0..MAIN_LEN-1 and the subprogram right after it. The PC addresses
// the main program, the subprogram counter the subprogram; when neither is
// active the ROM delivers the all-zero NOP word, so the processor idles until
// the next sample. The contents are the PROGRAM parameter, which plays the
// part of the ROM personalisation. Read is combinational: the control word is
// valid in the same cycle as its address.
module mc_rom #(
  parameter int unsigned DEPTH    = 256,
  parameter int unsigned PAW      = 8,
  parameter int unsigned MAIN_LEN = 16,
  parameter logic [DEPTH-1:0][mc_pkg::CW_W-1:0] PROGRAM = '0
) (
  input  logic              pc_active,
  input  logic [PAW-1:0]    pc_addr,
  input  logic              spc_active,
  input  logic [PAW-1:0]    spc_addr,
  output mc_pkg::ctrl_t     cw
);
  logic [PAW:0] a;

  always_comb begin
    a  = '0;
    cw = mc_pkg::CW_NOP;
    if (pc_active) begin
      a  = {1'b0, pc_addr};
      if (a < (PAW+1)'(DEPTH)) cw = mc_pkg::ctrl_t'(PROGRAM[a[PAW-1:0]]);
    end else if (spc_active) begin
      a  = (PAW+1)'(MAIN_LEN) + {1'b0, spc_addr};
      if (a < (PAW+1)'(DEPTH)) cw = mc_pkg::ctrl_t'(PROGRAM[a[PAW-1:0]]);
    end
  end
endmodule
