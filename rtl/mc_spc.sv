// mc_spc: subprogram counter of one macrocell processor.
//
// After the main program the microprogram may run a subprogram a fixed number
// of times (N_ITER iterations of SUB_LEN words). 'go' (the PC's 'done') starts
// the first iteration in the next cycle. 'addr' is the offset inside the
// subprogram, 'iter' the iteration number and 'iter_start' marks the first
// cycle of every iteration, which the address arithmetic unit uses to step its
// IX counter. After the last word of the last iteration the counter is idle.
// A new 'go' while running restarts it. Reset is synchronous, active high.
module mc_spc #(
  parameter int unsigned SUB_LEN = 8,
  parameter int unsigned N_ITER  = 4,
  parameter int unsigned PAW     = 8
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           go,
  output logic           active,
  output logic           iter_start,
  output logic [PAW-1:0] addr,
  output logic [7:0]     iter
);
  always_ff @(posedge clk) begin
    if (rst) begin
      active <= 1'b0;
      addr   <= '0;
      iter   <= '0;
    end else if (go) begin
      active <= 1'b1;
      addr   <= '0;
      iter   <= '0;
    end else if (active) begin
      if (addr == PAW'(SUB_LEN - 1)) begin
        addr <= '0;
        if (iter == 8'(N_ITER - 1)) active <= 1'b0;
        else iter <= iter + 1'b1;
      end else begin
        addr <= addr + 1'b1;
      end
    end
  end

  assign iter_start = active && (addr == '0);

  initial assert (SUB_LEN >= 1 && N_ITER >= 1 && N_ITER <= 256) else $error("mc_spc: bad size");
endmodule
