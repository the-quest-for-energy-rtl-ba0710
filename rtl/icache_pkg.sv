// icache_pkg: constants and types shared by the shared instruction caches.
//
// Both cache architectures (single-port shared "SP" and multi-port shared "MP")
// use a 32-byte (256-bit, 8-instruction) cache line, 4-way set-associative
// banks, pseudo-random replacement and a 64-bit AXI4 refill path on which a
// line arrives as a 4-beat INCR burst. These numbers follow the reference architecture. The
// AXI4 channels are reduced to the read-address (AR) and read-data (R) fields
// an instruction cache uses; the 8-bit ID width is this design's choice.
//
// Address split used everywhere (byte address):
//   [4:0]                     byte offset in the line ([4:2] = instruction index)
//   [5 +: BANK_W]             bank index (line-interleaved banks)
//   [5+BANK_W +: SET_W]       set index inside the bank
//   [31 : 5+BANK_W]           tag (kept in full, so it also holds the set bits)
package icache_pkg;

  localparam int unsigned ADDR_W      = 32;
  localparam int unsigned INSTR_W     = 32;
  localparam int unsigned LINE_BYTES  = 32;
  localparam int unsigned LINE_W      = LINE_BYTES * 8;          // 256
  localparam int unsigned WORDS_LINE  = LINE_BYTES / 4;          // 8
  localparam int unsigned OFFS_W      = $clog2(LINE_BYTES);      // 5
  localparam int unsigned AXI_DATA_W  = 64;
  localparam int unsigned AXI_ID_W    = 8;
  localparam int unsigned BEATS       = LINE_W / AXI_DATA_W;     // 4
  localparam int unsigned BEAT_W      = $clog2(BEATS);           // 2

  // AXI4 read-address channel payload (burst type INCR, size 8 bytes implied)
  typedef struct packed {
    logic [ADDR_W-1:0]   addr;
    logic [AXI_ID_W-1:0] id;
    logic [7:0]          len;   // beats - 1
  } axi_ar_t;

  // AXI4 read-data channel payload (response always OKAY in this design)
  typedef struct packed {
    logic [AXI_DATA_W-1:0] data;
    logic [AXI_ID_W-1:0]   id;
    logic                  last;
  } axi_r_t;

  // 32-bit instruction number w (0..7) of a 256-bit line
  function automatic logic [INSTR_W-1:0] line_word(input logic [LINE_W-1:0] line,
                                                   input logic [2:0] w);
    return line[w*INSTR_W +: INSTR_W];
  endfunction

endpackage
