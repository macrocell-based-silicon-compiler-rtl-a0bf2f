// mc_ram: data memory of one macrocell processor.
//
// Single-port memory of DEPTH words of W bits with read/write locations for
// state variables intermixed with read-only locations for constants. A
// location is read-only where RO_MASK has a 1; it then reads CONSTS[a] and
// ignores writes. One access per cycle: the read is combinational (the AUIO's
// MOR register captures it at the clock edge), the write happens at the clock
// edge. Reset clears the read/write words so state variables start at zero;
// that reset and the mask form are this design's choices.
module mc_ram #(
  parameter int unsigned W     = 16,
  parameter int unsigned DEPTH = 64,
  localparam int unsigned AW   = mc_pkg::ADDR_W,
  parameter logic [DEPTH-1:0] RO_MASK = '0,
  parameter logic [DEPTH-1:0][W-1:0] CONSTS = '0
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [AW-1:0] addr,
  input  logic          we,
  input  logic [W-1:0]  wdata,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < int'(DEPTH); i++) mem[i] <= '0;
    end else if (we && 32'(addr) < DEPTH && !RO_MASK[addr]) begin
      mem[addr] <= wdata;
    end
  end

  always_comb begin
    rdata = '0;
    if (32'(addr) < DEPTH) rdata = RO_MASK[addr] ? CONSTS[addr] : mem[addr];
  end

  initial assert (DEPTH <= 2**AW) else $error("mc_ram: DEPTH exceeds address field");
endmodule
