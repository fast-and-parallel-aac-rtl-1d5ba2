// hcb_pla: one Huffman codebook as a PLA-like parallel match array (Fig. 8).
//
// Every entry holds a codeword (MSB aligned in 21 bits), its length and the
// decoded value. All entries compare their codeword with the top bits of the
// barrel shifter window at once; because a Huffman code is prefix-free at
// most one entry matches, and its value and length are ORed onto the
// outputs. A codeword is therefore decoded in one clock cycle whatever its
// length, as the document requires.
//
// The contents of the AAC codebooks come from the AAC standard and are not
// printed in the document, so in this design the array is loaded through a
// write port (cfg_we/cfg_addr/...) after reset instead of being fixed logic.
// Lookup is combinational; loading takes one cycle per entry.
module hcb_pla
  import aac_pkg::*;
#(
  parameter int unsigned ENTRIES = 81,
  parameter int unsigned VAL_W   = 4*TUPLE_ELEM_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 cfg_we,
  input  logic [HCB_IDX_W-1:0] cfg_addr,
  input  logic [WIN_W-1:0]     cfg_code,
  input  logic [LEN_W-1:0]     cfg_len,
  input  logic [VAL_W-1:0]     cfg_val,
  input  logic [WIN_W-1:0]     window,
  output logic                 hit,
  output logic [LEN_W-1:0]     len,
  output logic [VAL_W-1:0]     val
);
  logic [WIN_W-1:0] code_q [ENTRIES];
  logic [LEN_W-1:0] len_q  [ENTRIES];
  logic [VAL_W-1:0] val_q  [ENTRIES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) begin
        code_q[i] <= '0; len_q[i] <= '0; val_q[i] <= '0;
      end
    end else if (cfg_we && (32'(cfg_addr) < ENTRIES)) begin
      code_q[cfg_addr] <= cfg_code;
      len_q[cfg_addr]  <= cfg_len;
      val_q[cfg_addr]  <= cfg_val;
    end
  end

  always_comb begin
    hit = 1'b0; len = '0; val = '0;
    for (int i = 0; i < ENTRIES; i++) begin
      logic [WIN_W-1:0] mask;
      mask = ~({WIN_W{1'b1}} >> len_q[i]);
      if ((len_q[i] != '0) && (((window ^ code_q[i]) & mask) == '0)) begin
        hit = 1'b1;
        len = len | len_q[i];
        val = val | val_q[i];
      end
    end
  end
endmodule
