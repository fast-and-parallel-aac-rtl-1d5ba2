// bitstream_parser: bit-level front end of the DEMUX_HUFF module (Fig. 7).
//
// 32-bit words of one compressed frame enter through a one-word input buffer
// into two registers, Reg_0 (current word) and Reg_1 (next word). A barrel
// shifter looks at the 64 bits {Reg_0, Reg_1} starting at bit offset ACC and
// presents the next WIN_W = 21 bits of the stream, MSB first, on `window`.
// When the caller consumes bits, the Len_Mux picks the Huffman codeword
// length (len_sel = 1) or the parse length (len_sel = 0); an adder adds it to
// the 5-bit accumulator ACC and its carry (crossing a word boundary) moves
// Reg_1 into Reg_0 and pulls the next word. Consuming takes one cycle, so one
// field or one codeword is consumed per clock.
//
// Frame handling (this design's choice): `restart` clears the registers for a
// new frame; after a word flagged `in_last` is taken no more words are pulled
// and missing bits read as zero. `window_valid` is high when the 21 bits on
// `window` are real stream bits or padding after the last word. `bit_count`
// counts consumed bits since restart.
module bitstream_parser
  import aac_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              restart,
  // word input (valid/ready)
  input  logic [31:0]       in_word,
  input  logic              in_last,
  input  logic              in_valid,
  output logic              in_ready,
  // barrel shifter output
  output logic [WIN_W-1:0]  window,
  output logic              window_valid,
  // consume request
  input  logic              consume,
  input  logic              len_sel,
  input  logic [LEN_W-1:0]  huff_len,
  input  logic [LEN_W-1:0]  parse_len,
  output logic [15:0]       bit_count
);
  logic [31:0]      reg0, reg1, ibuf;
  logic             reg0_v, reg1_v, ibuf_v;
  logic             last_seen;     // a word flagged last has entered
  logic [LEN_W-1:0] acc;
  logic [LEN_W-1:0] shift_len;
  logic [LEN_W:0]   sum;
  logic             carry;
  logic [63:0]      shifted;

  assign shift_len = len_sel ? huff_len : parse_len;   // Len_Mux
  assign sum       = {1'b0, acc} + {1'b0, shift_len};
  assign carry     = sum[LEN_W];
  assign shifted   = {reg0, reg1} << acc;              // barrel shifter
  assign window    = shifted[63 -: WIN_W];
  assign window_valid = reg0_v && (reg1_v || (last_seen && !ibuf_v));
  assign in_ready  = !ibuf_v && !last_seen;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reg0 <= '0; reg1 <= '0; ibuf <= '0;
      reg0_v <= 1'b0; reg1_v <= 1'b0; ibuf_v <= 1'b0;
      last_seen <= 1'b0; acc <= '0; bit_count <= '0;
    end else if (restart) begin
      reg0 <= '0; reg1 <= '0; ibuf <= '0;
      reg0_v <= 1'b0; reg1_v <= 1'b0; ibuf_v <= 1'b0;
      last_seen <= 1'b0; acc <= '0; bit_count <= '0;
    end else begin
      logic [31:0] nb;
      logic        nbv;
      logic [31:0] n0, n1;
      logic        n0v, n1v;
      nb = ibuf; nbv = ibuf_v;
      if (in_valid && in_ready) begin
        nb = in_word; nbv = 1'b1;
        last_seen <= in_last;
      end
      n0 = reg0; n0v = reg0_v; n1 = reg1; n1v = reg1_v;
      if (consume && window_valid) begin
        acc       <= sum[LEN_W-1:0];
        bit_count <= bit_count + 16'(shift_len);
        if (carry) begin
          n0 = reg1; n0v = reg1_v; n1 = '0; n1v = 1'b0;
        end
      end
      // refill the register pair from the input buffer
      if (!n0v && nbv) begin
        n0 = nb; n0v = 1'b1; nbv = 1'b0;
      end else if (!n1v && nbv) begin
        n1 = nb; n1v = 1'b1; nbv = 1'b0;
      end
      reg0 <= n0; reg0_v <= n0v; reg1 <= n1; reg1_v <= n1v;
      ibuf <= nb; ibuf_v <= nbv;
    end
  end

  // a consume never advances past the 21 visible bits
  assert property (@(posedge clk) disable iff (!rst_n) consume |-> shift_len <= LEN_W'(WIN_W));
endmodule
