// mc_host_if: host interface macrocell.
//
// Buffers one block of data per frame between the processors' bit-serial
// links and the parallel host data bus. A frame is FRAME sample intervals.
// The buffers are double: during a frame the processors use one bank and the
// host the other; on the sample strobe that starts a new frame the banks swap,
// the serial word pointers return to word 0 and 'irq' asks the host to
// transfer the block (read what the processors produced in the last frame,
// write what they are to consume in the next one).
//
// Processor side (MSB first, one bit per clock):
//   tx_bit/tx_req  next bit of in-buffer word rptr; the processor's
//                  serial-parallel converter asserts tx_req when it shifts
//   rx_bit/rx_vld  bits from a processor's parallel-serial converter; every
//                  W bits form one word of the out-buffer
// Host side, synchronous to clk: h_addr[HAW-1] = 0 selects buffer word
// h_addr[HAW-2:0] (read: out-buffer, write: in-buffer, both of the host's
// bank); h_addr[HAW-1] = 1 reads the frame count and a write there clears irq.
// An assertion checks that no serial word is cut by a frame boundary.
// The per-frame block transfer on interrupt follows the document; the double
// buffering, the register map and the acknowledge are this design's choices.
module mc_host_if #(
  parameter int unsigned W         = 16,
  parameter int unsigned FRAME     = 8,
  parameter int unsigned IN_WORDS  = 8,
  parameter int unsigned OUT_WORDS = 16,
  localparam int unsigned MAXW     = (IN_WORDS > OUT_WORDS) ? IN_WORDS : OUT_WORDS,
  localparam int unsigned IW       = (MAXW > 1) ? $clog2(MAXW) : 1,
  localparam int unsigned HAW      = IW + 1
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           sample,
  // processor side
  output logic           tx_bit,
  input  logic           tx_req,
  input  logic           rx_bit,
  input  logic           rx_vld,
  // host side
  input  logic           h_cs,
  input  logic           h_we,
  input  logic [HAW-1:0] h_addr,
  input  logic [W-1:0]   h_wdata,
  output logic [W-1:0]   h_rdata,
  output logic           irq
);
  logic [W-1:0] in_buf  [2][IN_WORDS];
  logic [W-1:0] out_buf [2][OUT_WORDS];
  logic         pb;                    // processor bank; host uses !pb
  logic [15:0]  fcnt;                  // sample count within the frame
  logic [15:0]  frames;
  logic [IW-1:0] rptr, wptr;
  logic [$clog2(W)-1:0] tcnt, rcnt;
  logic [W-1:0] rx_sr;
  logic         wfull;
  logic         frame_edge;
  logic [IW-1:0] hidx;

  assign frame_edge = sample && (fcnt == 16'(FRAME));
  assign hidx       = h_addr[IW-1:0];

  always_ff @(posedge clk) begin
    if (rst) begin
      pb     <= 1'b0;
      fcnt   <= '0;
      frames <= '0;
      irq    <= 1'b0;
      rptr   <= '0;
      wptr   <= '0;
      tcnt   <= '0;
      rcnt   <= '0;
      rx_sr  <= '0;
      wfull  <= 1'b0;
      for (int b = 0; b < 2; b++) begin
        for (int i = 0; i < int'(IN_WORDS); i++)  in_buf[b][i]  <= '0;
        for (int i = 0; i < int'(OUT_WORDS); i++) out_buf[b][i] <= '0;
      end
    end else begin
      // frame boundary: swap banks, restart the serial pointers, interrupt
      if (frame_edge) begin
        pb     <= !pb;
        fcnt   <= 16'd1;
        frames <= frames + 1'b1;
        irq    <= 1'b1;
        rptr   <= '0;
        wptr   <= '0;
        tcnt   <= '0;
        rcnt   <= '0;
        wfull  <= 1'b0;
      end else begin
        if (sample) fcnt <= fcnt + 1'b1;
        // to the processor
        if (tx_req) begin
          if (tcnt == $clog2(W)'(W - 1)) begin
            tcnt <= '0;
            rptr <= (rptr == IW'(IN_WORDS - 1)) ? '0 : rptr + 1'b1;
          end else begin
            tcnt <= tcnt + 1'b1;
          end
        end
        // from the processor
        if (rx_vld) begin
          rx_sr <= {rx_sr[W-2:0], rx_bit};
          if (rcnt == $clog2(W)'(W - 1)) begin
            rcnt <= '0;
            if (!wfull) begin
              out_buf[pb][wptr] <= {rx_sr[W-2:0], rx_bit};
              if (wptr == IW'(OUT_WORDS - 1)) wfull <= 1'b1;
              else wptr <= wptr + 1'b1;
            end
          end else begin
            rcnt <= rcnt + 1'b1;
          end
        end
      end
      // host writes
      if (h_cs && h_we) begin
        if (h_addr[HAW-1])                  irq <= 1'b0;
        else if (32'(hidx) < IN_WORDS)      in_buf[!pb][hidx] <= h_wdata;
      end
    end
  end

  assign tx_bit = in_buf[pb][rptr][W-1-tcnt];

  always_comb begin
    h_rdata = '0;
    if (h_addr[HAW-1])                 h_rdata = W'(frames);
    else if (32'(hidx) < OUT_WORDS)    h_rdata = out_buf[!pb][hidx];
  end

  initial assert (W >= 2 && (W & (W - 1)) == 0) else $error("mc_host_if: W must be a power of two");

  // Link rule: the static schedule must finish every serial word inside the
  // sample interval that carries it, so no word is cut by a frame boundary.
  a_word_in_frame: assert property (@(posedge clk) disable iff (rst)
    frame_edge |-> (tcnt == '0 && rcnt == '0))
    else $error("mc_host_if: serial word cut by a frame boundary");
endmodule
