// emu_icn_mem: the memory for interconnection of an emulator unit.
//
// DEPTH configuration words of CFG_W bits, one per step the unit performs.
// The word of the current step sets the programmable interconnection
// network, the two shifters and the end-of-evaluation flag (layout in
// lut_pkg::cfg_w). It is small, so it is built from flip-flops and read
// asynchronously: cfg follows rd_idx combinationally. Written one word per
// clock through (wr_en, wr_idx, wr_data); words are reset to zero.
// The document names this memory and shows that it drives the network; its
// word layout, depth and read timing are this design's choices.
module emu_icn_mem #(
  parameter int unsigned DEPTH = 4,
  parameter int unsigned CFG_W = 50,
  localparam int unsigned IDX_W = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [IDX_W-1:0] rd_idx,
  output logic [CFG_W-1:0] cfg,
  input  logic             wr_en,
  input  logic [IDX_W-1:0] wr_idx,
  input  logic [CFG_W-1:0] wr_data
);

  logic [CFG_W-1:0] word_q [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) word_q[i] <= '0;
    end else if (wr_en && (32'(wr_idx) < DEPTH)) begin
      word_q[wr_idx] <= wr_data;
    end
  end

  assign cfg = (32'(rd_idx) < DEPTH) ? word_q[rd_idx] : '0;

endmodule
