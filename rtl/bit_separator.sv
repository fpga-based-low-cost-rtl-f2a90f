// bit_separator: the symbol separator. Turns the parallel data word d_in into
// one bit per bit period, least significant bit first, and drives d_out, which
// is both the select of the output mux and an output pin.
//
// On each clock with en high, d_out takes the next bit. At the first bit of a
// word (bit index 0) the whole of d_in is captured, so a word is always sent
// from one consistent value; after bit DATA_W-1 the index wraps and the next
// word is captured, i.e. d_in is sent over and over. The LSB-first order
// matches the original simulation traces; the capture-per-word, the repeat and
// the synchronous reset `rst` (active high: index 0, d_out 0) are this
// design's choices.
module bit_separator
  import mod_pkg::DATA_W;
#(
  parameter int unsigned DATA_W_P = DATA_W
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                en,
  input  logic [DATA_W_P-1:0] d_in,
  output logic                d_out
);

  localparam int unsigned IDX_W = (DATA_W_P > 1) ? $clog2(DATA_W_P) : 1;

  logic [DATA_W_P-1:0] word;
  logic [IDX_W-1:0]    idx;

  always_ff @(posedge clk) begin
    if (rst) begin
      word  <= '0;
      idx   <= '0;
      d_out <= 1'b0;
    end else if (en) begin
      if (idx == '0) begin
        word  <= d_in;
        d_out <= d_in[0];
      end else begin
        d_out <= word[idx];
      end
      idx <= (idx == IDX_W'(DATA_W_P-1)) ? '0 : idx + 1'b1;
    end
  end

endmodule
