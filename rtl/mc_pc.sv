// mc_pc: program counter of one macrocell processor.
//
// The processor runs its microprogram once per sample interval with no
// branches. A one-cycle 'sample' strobe starts the interval: from the next
// cycle the PC steps through the main program, ROM addresses 0..MAIN_LEN-1,
// one address per clock. 'start' marks the first main-program cycle and
// 'done' the last, which hands control to the subprogram counter. Between the
// end of the program and the next strobe the PC is idle ('active' low).
// RESET (synchronous, active high) stops the PC; the sample-strobe start and
// the ROM layout are this design's choices.
module mc_pc #(
  parameter int unsigned MAIN_LEN = 16,
  parameter int unsigned PAW      = 8
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           sample,
  output logic           active,
  output logic           start,
  output logic           done,
  output logic [PAW-1:0] addr
);
  always_ff @(posedge clk) begin
    if (rst) begin
      active <= 1'b0;
      start  <= 1'b0;
      addr   <= '0;
    end else begin
      start <= sample;
      if (sample) begin
        active <= 1'b1;
        addr   <= '0;
      end else if (active) begin
        if (addr == PAW'(MAIN_LEN - 1)) active <= 1'b0;
        else addr <= addr + 1'b1;
      end
    end
  end

  assign done = active && (addr == PAW'(MAIN_LEN - 1)) && !sample;

  initial assert (MAIN_LEN >= 1 && MAIN_LEN <= 2**PAW) else $error("mc_pc: MAIN_LEN out of range");
endmodule
