// sram_pkg: sizes shared by the blocks of the 32K-bit sleepy SRAM.
//
// The memory holds 4096 words of 8 bits in a 128-row by 256-column cell
// array. Address bits A<6:0> pick the row (word line) and A<11:7> pick one
// of 32 columns inside each of the eight 32-column bit groups. All of these
// numbers are the design's specified organisation. SLEEPY_ROWS_DEFAULT is the
// 50 % partition: half of the rows, the half nearest the column circuitry
// and data output, are built from sleepy (sleep-transistor) cells.
package sram_pkg;
  localparam int unsigned ROWS                = 128;
  localparam int unsigned COLS                = 256;
  localparam int unsigned WORD_BITS           = 8;
  localparam int unsigned COLS_PER_BIT        = COLS / WORD_BITS;   // 32
  localparam int unsigned ROW_ADDR_BITS       = $clog2(ROWS);       // 7
  localparam int unsigned COL_ADDR_BITS       = $clog2(COLS_PER_BIT); // 5
  localparam int unsigned ADDR_BITS           = ROW_ADDR_BITS + COL_ADDR_BITS; // 12
  localparam int unsigned SLEEPY_ROWS_DEFAULT = 64;
endpackage
