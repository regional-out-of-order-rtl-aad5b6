// roow_pkg: types and default sizes shared by the regional out-of-order
// write (ROOW) store path.
//
// A store committed by the core carries a one-bit mode copied from the
// processor's region flag: SYNC stores (flag 0, the reset value) write to the
// cache in program order exactly as in a TSO store buffer, DRF stores (flag 1)
// may write out of order.  SB_ENTRIES follows the 56-entry store queue/store
// buffer of the evaluated Skylake-like core and CACHE_STAGES the four-stage,
// single-port cache store pipeline.  Address and data widths are this
// design's own choice (a 48-bit byte address, 64-bit store data with byte
// enables); the document does not give them.
package roow_pkg;

  typedef enum logic {
    MODE_SYNC = 1'b0,  // store from a synchronization region: in order
    MODE_DRF  = 1'b1   // store from a data-race-free region: out of order
  } mode_e;

  localparam int unsigned SB_ENTRIES   = 56;  // store queue + store buffer
  localparam int unsigned CACHE_STAGES = 4;   // cache store pipeline depth
  localparam int unsigned ADDR_W       = 48;  // byte address width
  localparam int unsigned DATA_W       = 64;  // store data width
  localparam int unsigned BE_W         = DATA_W / 8;
  localparam int unsigned WADDR_W      = ADDR_W - $clog2(BE_W); // word address

endpackage
