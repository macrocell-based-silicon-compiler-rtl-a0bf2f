// mc_aau: address arithmetic unit of one macrocell processor.
//
// Turns the address field of the control word into the data-memory address.
// Four address modes:
//   AM_DIR  address field as is
//   AM_IX   field + IX, where IX counts subprogram iterations: -1 during the
//           main program, 0 in the first iteration, 1 in the second, ...
//   AM_IY   field + IY, a sample counter with a fixed modulus IY_MOD
//   AM_PTR  field + P, a pointer register the microcode can load with the
//           field (PTR_LOAD) or advance by the field (PTR_ADD)
// IX and IY follow the document; the pointer register is this design's form
// of its "more general addressing, including pointer arithmetic". Addresses
// wrap modulo DEPTH. IY advances on every sample strobe and starts at 0 in the
// first interval after reset. The address is combinational; IX, IY and P
// update at the clock edge. 'in_main' (IX = -1) goes to the FSM.
// As in the document, only the addressing hardware a program uses need be
// built: USE_IX, USE_IY and USE_PTR remove the IX counter, the IY counter and
// the pointer register. A removed mode then addresses like AM_DIR, and
// without IX the 'ix' output is just -1 in the main program and 0 otherwise.
module mc_aau #(
  parameter int unsigned DEPTH  = 64,
  parameter int unsigned IY_MOD = 4,
  parameter bit          USE_IX  = 1'b1,
  parameter bit          USE_IY  = 1'b1,
  parameter bit          USE_PTR = 1'b1,
  localparam int unsigned AW    = mc_pkg::ADDR_W
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              sample,     // sample-interval strobe
  input  logic              pc_active,  // main program running
  input  logic              iter_start, // first cycle of a subprogram iteration
  input  logic [AW-1:0]     field,
  input  mc_pkg::amode_e    amode,
  input  mc_pkg::ptr_op_e   ptr_op,
  output logic [AW-1:0]     ea,
  output logic              in_main,
  output logic signed [8:0] ix,
  output logic [AW-1:0]     iy
);
  logic signed [8:0] ix_q;
  logic [AW-1:0]     ptr_q;
  int                sum;

  // IX is -1 throughout the main program and steps at each iteration start.
  always_comb begin
    if (pc_active)       ix = -9'sd1;
    else if (!USE_IX)    ix = 9'sd0;
    else if (iter_start) ix = ix_q + 9'sd1;
    else                 ix = ix_q;
  end
  assign in_main = (ix == -9'sd1);

  always_comb begin
    unique case (amode)
      mc_pkg::AM_IX:  sum = int'(field) + (USE_IX  ? int'(ix)    : 0);
      mc_pkg::AM_IY:  sum = int'(field) + (USE_IY  ? int'(iy)    : 0);
      mc_pkg::AM_PTR: sum = int'(field) + (USE_PTR ? int'(ptr_q) : 0);
      default:        sum = int'(field);
    endcase
    ea = AW'((sum + int'(DEPTH)) % int'(DEPTH));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ix_q  <= -9'sd1;
      iy    <= AW'(IY_MOD - 1);
      ptr_q <= '0;
    end else begin
      if (USE_IX) ix_q <= ix;
      if (USE_IY && sample) iy <= (iy == AW'(IY_MOD - 1)) ? '0 : iy + 1'b1;
      if (USE_PTR) unique case (ptr_op)
        mc_pkg::PTR_LOAD: ptr_q <= AW'(int'(field) % int'(DEPTH));
        mc_pkg::PTR_ADD:  ptr_q <= AW'((int'(ptr_q) + int'(field)) % int'(DEPTH));
        default:          ;
      endcase
    end
  end

  initial assert (DEPTH <= 2**AW && IY_MOD >= 1 && IY_MOD <= 2**AW) else $error("mc_aau: bad size");
endmodule
