// front_end: receive side of a network link.
//
// The 24 link wires carry one beat on each clock edge: the beat sent in the
// transmitter's clock-high phase is sampled on the falling edge, the beat
// sent in its clock-low phase on the following rising edge. Two beats make a
// pair per 100 MHz cycle and two pairs make a frame of four beats (one 50 MHz
// flit cycle). Each beat is 20 data bits, an even-parity bit (bit 20) and
// three control bits (bits 23:21). The front end re-assembles the frame,
// checks the parity of all four beats, and splits it into
//   - an 80-bit word: a 77-bit flit and the 3-bit virtual channel it is for,
//   - a returned flow-control credit for one virtual channel.
//
// Control bits (this design's framing, not given by the router description):
//   beat0: [23] frame start = 1, [22] flit valid, [21] credit valid
//   beat1: [23] 0, [22:21] credit vc[1:0]
//   beat2: [23] 0, [21] credit vc[2]
//   beat3: [23] 0
//
// The frame start bit lets the receiver find the frame boundary without a
// shared 50 MHz phase. The router description uses a plesiochronous retiming
// scheme between independent clocks; here the sender and receiver share the
// clock frequency and phase, and the link must arrive with a small delay so
// that each edge samples the beat of the preceding half cycle.
//
// Outputs are registered and valid for one 100 MHz cycle, two cycles after
// the last beat of the frame was sampled at the most.
module front_end
  import rr_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic [LINK_W-1:0]   link_in,
  output logic                flit_valid,
  output logic [VC_W-1:0]     flit_vc,
  output logic [FLIT_W-1:0]   flit,
  output logic                credit_valid,
  output logic [VC_W-1:0]     credit_vc,
  output logic                parity_err
);
  logic [LINK_W-1:0] beat_fall;           // beat sampled on the falling edge
  logic [LINK_W-1:0] first_lo, first_hi;  // first pair of the frame
  logic              have_first;

  always_ff @(negedge clk) beat_fall <= link_in;

  logic [LINK_W-1:0] cur_lo, cur_hi;
  assign cur_lo = beat_fall;
  assign cur_hi = link_in;

  logic [WORD_W-1:0] word;
  assign word = {cur_hi[BEAT_D-1:0], cur_lo[BEAT_D-1:0],
                 first_hi[BEAT_D-1:0], first_lo[BEAT_D-1:0]};

  logic bad;
  assign bad = (^first_lo) | (^first_hi) | (^cur_lo) | (^cur_hi);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have_first   <= 1'b0;
      first_lo     <= '0;
      first_hi     <= '0;
      flit_valid   <= 1'b0;
      flit_vc      <= '0;
      flit         <= '0;
      credit_valid <= 1'b0;
      credit_vc    <= '0;
      parity_err   <= 1'b0;
    end else begin
      flit_valid   <= 1'b0;
      credit_valid <= 1'b0;
      parity_err   <= 1'b0;
      if (cur_lo[23]) begin
        first_lo   <= cur_lo;
        first_hi   <= cur_hi;
        have_first <= 1'b1;
      end else if (have_first) begin
        have_first   <= 1'b0;
        flit_valid   <= first_lo[22];
        flit         <= word[FLIT_W-1:0];
        flit_vc      <= word[WORD_W-1:FLIT_W];
        credit_valid <= first_lo[21];
        credit_vc    <= {cur_lo[21], first_hi[22:21]};
        parity_err   <= bad;
      end
    end
  end
endmodule
