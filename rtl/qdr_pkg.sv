`timescale 1ns/1ps
// Shared constants and types of the QDR II SRAM interface.
//
// The memory is a 512K x 36 QDR II SRAM with a four-word burst, so one
// address selects four 36-bit words and the burst address is 17 bits wide.
// One user-side cycle carries two words (the low word on USER_DWL, the high
// word on USER_DWH), so a burst takes two user cycles and the user-side data
// word is 72 bits: the same 72-bit width the UART packing FIFOs produce from
// eight 9-bit characters.
package qdr_pkg;
  localparam int unsigned ADDR_W   = 17;   // burst address (512K words / 4)
  localparam int unsigned DATA_W   = 36;   // one memory word
  localparam int unsigned BW_W     = 4;    // byte-write enables per word
  localparam int unsigned UDATA_W  = 2 * DATA_W;  // user word: {DWH, DWL}
  localparam int unsigned CHAR_W   = 9;    // UART character
  localparam int unsigned CHARS_PER_WORD = UDATA_W / CHAR_W;  // 8

  // One user-cycle half of a write burst: two words and their byte enables.
  typedef struct packed {
    logic [BW_W-1:0]   bwh_n;
    logic [BW_W-1:0]   bwl_n;
    logic [DATA_W-1:0] dwh;
    logic [DATA_W-1:0] dwl;
  } wr_half_t;

  // Commands the read/write state machine hands to the physical interface,
  // one per user clock cycle.
  typedef struct packed {
    logic              r_n;    // read command (active low)
    logic              w_n;    // write command (active low)
    logic [ADDR_W-1:0] sa;     // address bus
    logic [DATA_W-1:0] d_rise; // word written on the rising edge of K
    logic [DATA_W-1:0] d_fall; // word written on the rising edge of K#
    logic [BW_W-1:0]   bw_rise_n;
    logic [BW_W-1:0]   bw_fall_n;
  } phy_cmd_t;
endpackage
