// de_pkg: types and constants shared by the data reorganization engine.
//
// The engine moves finite affine streams between memory modules through a
// programmable switching network. This package fixes the memory word width
// (32 bits, the word the engine packs elements into), the element-width and
// channel-direction encodings, the switching-network pattern encoding and the
// register map offsets. The 32-bit word follows the original design; the encodings
// and the register map are this design's own choices.
package de_pkg;

  // Memory word and network lane width in bits.
  localparam int unsigned WORD_W = 32;

  // Element width of a channel: how many elements share one memory word.
  typedef enum logic [1:0] {
    EW8  = 2'd0,   // four 8-bit elements per word, element 0 in bits 7:0
    EW16 = 2'd1,   // two 16-bit elements per word, element 0 in bits 15:0
    EW32 = 2'd2    // one 32-bit element per word
  } elem_w_e;

  // Direction of a channel, seen from the memory.
  typedef enum logic {
    DIR_READ  = 1'b0,  // memory -> FIFO -> network
    DIR_WRITE = 1'b1   // network -> FIFO -> memory
  } dir_e;

  // Switching-network patterns merged into one network, chosen by register.
  typedef enum logic [1:0] {
    NET_IDLE      = 2'd0,  // nothing connected
    NET_REPLICATE = 2'd1,  // primary source -> every lane sink (one lane: copy)
    NET_MERGE     = 2'd2,  // lane sources interleaved into the primary sink
    NET_STRIPE    = 2'd3   // primary source split across the lane sinks
  } net_mode_e;

  // Per-channel configuration, written through the engine registers.
  typedef struct packed {
    logic [3:0] num_entries;  // AGU entries used round-robin (0 counts as 1)
    logic [3:0] first_entry;  // first AGU entry of this channel
    elem_w_e    ew;           // element width on the network side
    dir_e       dir;
    logic       en;
  } ch_cfg_t;

  // Elements per memory word for an element width.
  function automatic logic [2:0] elems_per_word(elem_w_e ew);
    case (ew)
      EW8:     return 3'd4;
      EW16:    return 3'd2;
      default: return 3'd1;
    endcase
  endfunction

  // Mask of the valid element bits for an element width.
  function automatic logic [WORD_W-1:0] elem_mask(elem_w_e ew);
    case (ew)
      EW8:     return 32'h0000_00FF;
      EW16:    return 32'h0000_FFFF;
      default: return 32'hFFFF_FFFF;
    endcase
  endfunction

  // Register map (word addresses). Bits [11:8] pick a region: 0 global,
  // 1 + m memory controller m. Inside a memory-controller region:
  //   4*c + 0 : CH_CFG of channel c   (ch_cfg_t in bits [11:0])
  //   4*c + 1 : CH_LEN of channel c   (memory accesses in the stream)
  //   0x80 + 2*e     : BASE of AGU entry e
  //   0x80 + 2*e + 1 : ELEM_SIZE (stride) of AGU entry e
  localparam logic [7:0] REG_CTRL   = 8'h00;  // write bit 0 = start
  localparam logic [7:0] REG_STATUS = 8'h01;  // bit 0 busy, bit 1 done
  localparam logic [7:0] REG_NET    = 8'h02;  // [1:0] mode, [2] deal, [7:4] primary, [31:16] lane mask
  localparam logic [7:0] REG_CYCLES = 8'h03;  // cycles taken by the last operation
  localparam logic [7:0] REG_XFERS  = 8'h04;  // network transfers in the last operation
  localparam logic [7:0] REG_GRAN   = 8'h05;  // [15:0] words per lane turn in deal mode
  localparam logic [7:0] MC_ENTRY_BASE = 8'h80;

endpackage
