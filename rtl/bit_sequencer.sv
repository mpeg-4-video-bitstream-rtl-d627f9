// bit_sequencer: the bitstream buffer in front of the functional unit.
//
// It gives the bit-level access functions a parser needs: it fills itself
// from the incoming bitstream (FillBuffer), shows the next bits without
// consuming them (ShowBits), shows the next bits that start at a byte
// boundary (ShowBitsByteAlign) and advances the read pointer (FlushBits).
// GetBits is ShowBits followed by FlushBits in the same cycle.
//
// The bits are held MSB-first, left-aligned, in a 64-bit shift register
// with a fill count.  A 32-bit word is appended whenever the bits left
// after this cycle's flush fit in the upper half, so with a continuously
// valid input at least 32 bits are always available after the first fill.
// A 3-bit counter of consumed bits gives the distance to the next byte
// boundary.
//
// Interface: in_data/in_valid/in_ready is a valid-ready word input, first
// bit of the stream in in_data[31].  show is the next 32 bits, show_al the
// 32 bits after skipping `skip` bits to the next byte boundary, avail the
// number of valid bits.  flush_en/flush_n consume bits at the clock edge;
// flush_n must not exceed avail.  Bits beyond avail read as zero.
//
// The list of functions follows the published analysis; the buffer size,
// the word width, the handshake and the synchronous active-low reset are this design's own choices.
module bit_sequencer #(
  parameter int unsigned IN_W  = 32,   // input word width
  parameter int unsigned BUF_W = 64    // buffer size, 2 * IN_W
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [IN_W-1:0]           in_data,
  input  logic                      in_valid,
  output logic                      in_ready,
  output logic [IN_W-1:0]           show,
  output logic [IN_W-1:0]           show_al,
  output logic [2:0]                skip,
  output logic [$clog2(BUF_W+1)-1:0] avail,
  input  logic                      flush_en,
  input  logic [$clog2(IN_W+1)-1:0] flush_n
);

  localparam int unsigned CNT_W = $clog2(BUF_W + 1);

  logic [BUF_W-1:0] buf_q, buf_d, shifted, appended;
  logic [CNT_W-1:0] cnt_q, cnt_d, rem;
  logic [2:0]       pos_q;
  logic [CNT_W-1:0] n;

  always_comb begin
    n        = flush_en ? CNT_W'(flush_n) : '0;
    shifted  = buf_q << n;
    rem      = cnt_q - n;
    in_ready = (rem <= CNT_W'(BUF_W - IN_W));
    appended = {in_data, {(BUF_W-IN_W){1'b0}}} >> rem;
    if (in_valid && in_ready) begin
      buf_d = shifted | appended;
      cnt_d = rem + CNT_W'(IN_W);
    end else begin
      buf_d = shifted;
      cnt_d = rem;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      buf_q <= '0;
      cnt_q <= '0;
      pos_q <= '0;
    end else begin
      buf_q <= buf_d;
      cnt_q <= cnt_d;
      pos_q <= pos_q + n[2:0];
    end
  end

  assign skip    = 3'(-pos_q);
  assign show    = buf_q[BUF_W-1 -: IN_W];
  assign show_al = buf_q[BUF_W-1-32'(skip) -: IN_W];
  assign avail   = cnt_q;

  a_flush_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    flush_en |-> (CNT_W'(flush_n) <= cnt_q));

endmodule
