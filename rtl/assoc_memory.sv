// assoc_memory: the associative (content-addressable) memory of the processor.
//
// Parts, as in the processor's specification: a comparand register holding
// the word to look for, a mask register selecting the bits that take part
// (mask bit 1 = compared, 0 = ignored), a DEPTH x WORD_W array of associative
// cells, and a responder: one flip-flop per word that records the outcome of
// the last search. All words are compared in parallel in one cycle.
//
// Beyond the specification (this design's choices): each word has an
// occupied bit, set by a write and cleared by clear_all, and only occupied
// words respond. The responder offers any_match, the full match vector and
// the lowest responding address (first_addr); resp_clear drops that lowest
// responder, so a controller can visit the responders one after another
// (multiple-response resolution). Writes are bit-selective: only bits with
// wr_bits = 1 change, which lets a controller update one field of a word.
// Two combinational read ports: one for the control unit, one for the host.
//
// Timing: cmp_load, mask_load, wr_en, clear_all, search and resp_clear act on
// the rising clock edge. A search compares against the comparand and mask
// registers as they were before that edge and against the array contents
// before that edge; the responders are valid from the next cycle. When search
// and resp_clear are both high, search wins. Asynchronous active-low reset
// clears registers, occupied bits and responders (not the array contents).
module assoc_memory
  import cbadp_pkg::*;
#(
  parameter int DEPTH_P  = DEPTH,
  parameter int WORD_W_P = WORD_W,
  localparam int AW      = $clog2(DEPTH_P)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clear_all,
  // comparand and mask registers
  input  logic                cmp_load,
  input  logic [WORD_W_P-1:0] cmp_in,
  input  logic                mask_load,
  input  logic [WORD_W_P-1:0] mask_in,
  output logic [WORD_W_P-1:0] comparand,
  output logic [WORD_W_P-1:0] mask,
  // search and responder
  input  logic                search,
  input  logic                resp_clear,
  output logic [DEPTH_P-1:0]  responders,
  output logic                any_match,
  output logic [AW-1:0]       first_addr,
  // write port
  input  logic                wr_en,
  input  logic [AW-1:0]       wr_addr,
  input  logic [WORD_W_P-1:0] wr_data,
  input  logic [WORD_W_P-1:0] wr_bits,
  // read ports
  input  logic [AW-1:0]       rd_addr,
  output logic [WORD_W_P-1:0] rd_data,
  input  logic [AW-1:0]       io_rd_addr,
  output logic [WORD_W_P-1:0] io_rd_data
);

  logic [WORD_W_P-1:0] mem [DEPTH_P];
  logic [DEPTH_P-1:0]  occupied;
  logic [DEPTH_P-1:0]  hit;

  // parallel compare of every cell against the comparand under the mask
  always_comb begin
    for (int i = 0; i < DEPTH_P; i++)
      hit[i] = occupied[i] && (((mem[i] ^ comparand) & mask) == '0);
  end

  // responder: lowest responding address
  always_comb begin
    first_addr = '0;
    for (int i = DEPTH_P - 1; i >= 0; i--)
      if (responders[i]) first_addr = AW'(i);
  end
  assign any_match = |responders;

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= (mem[wr_addr] & ~wr_bits) | (wr_data & wr_bits);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      comparand  <= '0;
      mask       <= '0;
      occupied   <= '0;
      responders <= '0;
    end else begin
      if (cmp_load)  comparand <= cmp_in;
      if (mask_load) mask      <= mask_in;
      if (clear_all) begin
        occupied   <= '0;
        responders <= '0;
      end else begin
        if (wr_en) occupied[wr_addr] <= 1'b1;
        if (search)          responders <= hit;
        else if (resp_clear) responders[first_addr] <= 1'b0;
      end
    end
  end

  assign rd_data    = mem[rd_addr];
  assign io_rd_data = mem[io_rd_addr];

endmodule
