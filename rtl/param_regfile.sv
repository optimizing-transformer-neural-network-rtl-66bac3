// param_regfile: register file holding the trained parameters of one model.
//
// All N_WORDS words are visible at once on q, the register form of a
// completely partitioned array, so every matrix engine can read a whole weight
// matrix in the same cycle. A host writes one word per cycle through
// (wr_en, wr_addr, wr_data) and can read one back through rd_addr/rd_data.
// The reference keeps its weights inside the synthesised design and does not
// describe how they get there; the write port is this design's choice.
//
// Interface: synchronous write, combinational read. Reset clears all words.
// Writes to addresses >= N_WORDS are ignored.
module param_regfile
  import tfm_pkg::*;
#(
  parameter int N_WORDS = model_words(N_IN, D_MODEL, D_FF, N_LAYERS_VANILLA),
  localparam int AW     = (N_WORDS > 1) ? $clog2(N_WORDS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  fx_t           wr_data,
  input  logic [AW-1:0] rd_addr,
  output fx_t           rd_data,
  output fx_t           q [N_WORDS]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_WORDS; i++) q[i] <= '0;
    end else if (wr_en && (int'(wr_addr) < N_WORDS)) begin
      q[wr_addr] <= wr_data;
    end
  end

  assign rd_data = (int'(rd_addr) < N_WORDS) ? q[rd_addr] : '0;

endmodule
