// aac_pkg: types, constants and small lookup functions shared by the AAC LC
// decoder core units and the parallel N-stream wrapper.
//
// Holds the frame geometry (1024 spectral lines per channel per frame, 2048
// IMDCT outputs), the AAC window_sequence encoding, the Huffman codebook
// properties (tuple dimension, signedness, escape) and the scale factor band
// offsets. The band table and the codebook properties are those of the AAC
// LC syntax (ISO/IEC 13818-7 / 14496-3); only the 44.1/48 kHz long-window
// table is carried, which is this design's own restriction.
package aac_pkg;

  localparam int unsigned FRAME_LEN   = 1024;  // spectral lines per frame
  localparam int unsigned IMDCT_LEN   = 2048;  // long IMDCT output length
  localparam int unsigned NUM_SWB     = 49;    // long-window bands at 44.1/48 kHz
  localparam int unsigned WIN_W       = 21;    // barrel shifter output width (Fig. 7)
  localparam int unsigned LEN_W       = 5;     // shift length width (Fig. 7)
  localparam int unsigned SD_W        = 16;    // SD-RAM word (Fig. 5)
  localparam int unsigned SF_W        = 8;     // SF-RAM word (Fig. 5)
  localparam int unsigned DATA_W      = 32;    // IQ-RAM / filter bank word (Fig. 5)
  localparam int unsigned REAL_BITS   = 14;    // fraction bits of spectral/time data

  // Codebook numbering: 1..11 spectral, 12 used here for the scale factor book.
  localparam int unsigned NUM_HCB     = 12;
  localparam int unsigned HCB_SF      = 12;
  localparam int unsigned HCB_ESC     = 11;
  localparam int unsigned HCB_IDX_W   = 9;     // up to 289 entries (codebook 11)
  localparam int unsigned TUPLE_ELEM_W = 6;    // stored tuple element, -16..16

  typedef enum logic [1:0] {
    ONLY_LONG_SEQUENCE   = 2'd0,
    LONG_START_SEQUENCE  = 2'd1,
    EIGHT_SHORT_SEQUENCE = 2'd2,
    LONG_STOP_SEQUENCE   = 2'd3
  } win_seq_t;

  // Codebook load bundle, broadcast to every Huffman decoder.
  typedef struct packed {
    logic                     we;
    logic [3:0]               cb;     // 1..11 spectral, 12 = scale factor
    logic [HCB_IDX_W-1:0]     addr;
    logic [WIN_W-1:0]         code;   // codeword, MSB aligned in 21 bits
    logic [LEN_W-1:0]         len;    // codeword length, 1..19
    logic [4*TUPLE_ELEM_W-1:0] val;   // {w,x,y,z} (spectral) or index (SF)
  } hcb_cfg_t;

  // Entries of each codebook (index 1..12): sizes of the AAC books.
  function automatic int unsigned hcb_entries(int unsigned cb);
    case (cb)
      1, 2, 3, 4, 5, 6: return 81;
      7, 8:             return 64;
      9, 10:            return 169;
      11:               return 289;
      12:               return 121;
      default:          return 1;
    endcase
  endfunction

  function automatic logic hcb_is_quad(logic [3:0] cb);
    return (cb >= 4'd1) && (cb <= 4'd4);
  endfunction

  function automatic logic hcb_is_unsigned(logic [3:0] cb);
    return !((cb == 4'd1) || (cb == 4'd2) || (cb == 4'd5) || (cb == 4'd6));
  endfunction

  // swb_offset for 1024-line frames at 44.1 and 48 kHz; sfb = 0..49.
  function automatic logic [10:0] swb_offset_long(logic [5:0] sfb);
    case (sfb)
      6'd0: return 11'd0;     6'd1: return 11'd4;     6'd2: return 11'd8;
      6'd3: return 11'd12;    6'd4: return 11'd16;    6'd5: return 11'd20;
      6'd6: return 11'd24;    6'd7: return 11'd28;    6'd8: return 11'd32;
      6'd9: return 11'd36;    6'd10: return 11'd40;   6'd11: return 11'd48;
      6'd12: return 11'd56;   6'd13: return 11'd64;   6'd14: return 11'd72;
      6'd15: return 11'd80;   6'd16: return 11'd88;   6'd17: return 11'd96;
      6'd18: return 11'd108;  6'd19: return 11'd120;  6'd20: return 11'd132;
      6'd21: return 11'd144;  6'd22: return 11'd160;  6'd23: return 11'd176;
      6'd24: return 11'd196;  6'd25: return 11'd216;  6'd26: return 11'd240;
      6'd27: return 11'd264;  6'd28: return 11'd292;  6'd29: return 11'd320;
      6'd30: return 11'd352;  6'd31: return 11'd384;  6'd32: return 11'd416;
      6'd33: return 11'd448;  6'd34: return 11'd480;  6'd35: return 11'd512;
      6'd36: return 11'd544;  6'd37: return 11'd576;  6'd38: return 11'd608;
      6'd39: return 11'd640;  6'd40: return 11'd672;  6'd41: return 11'd704;
      6'd42: return 11'd736;  6'd43: return 11'd768;  6'd44: return 11'd800;
      6'd45: return 11'd832;  6'd46: return 11'd864;  6'd47: return 11'd896;
      6'd48: return 11'd928;  default: return 11'd1024;
    endcase
  endfunction

endpackage
