// ft_pkg: types and constants shared by the lockstep and fault-injection blocks.
//
// The AHB master bundle (what a core drives) and the AHB master input bundle
// (what the bus returns to a core) are the two signal groups the lockstep
// compare module works on. Widths follow the 32-bit processor configuration
// with a 64-bit AHB data bus. The APB request bundle carries one APB transfer
// to the fault-injection register. The GRGPREG field layout (which bits of the
// 32-bit register are the bit-mask and the write signal of each core) is this
// design's own choice; it is consistent with the register values 0x3 (mask
// only) and 0x7 (mask with write signal) used when injecting into one core.
package ft_pkg;

  // AHB widths
  localparam int unsigned AHB_AW = 32;
  localparam int unsigned AHB_DW = 64;

  // AHB transfer types
  typedef enum logic [1:0] {
    HTRANS_IDLE   = 2'b00,
    HTRANS_BUSY   = 2'b01,
    HTRANS_NONSEQ = 2'b10,
    HTRANS_SEQ    = 2'b11
  } htrans_e;

  // Signals a core drives as AHB master
  typedef struct packed {
    logic              hbusreq;
    htrans_e           htrans;
    logic [AHB_AW-1:0] haddr;
    logic              hwrite;
    logic [2:0]        hsize;
    logic [2:0]        hburst;
    logic [3:0]        hprot;
    logic [AHB_DW-1:0] hwdata;
  } ahb_mst_out_t;

  // Signals the bus returns to an AHB master
  typedef struct packed {
    logic              hgrant;
    logic              hready;
    logic [1:0]        hresp;
    logic [AHB_DW-1:0] hrdata;
  } ahb_mst_in_t;

  // Idle master output: no bus request, no transfer
  localparam ahb_mst_out_t AHB_MST_IDLE = '{
    hbusreq: 1'b0, htrans: HTRANS_IDLE, haddr: '0, hwrite: 1'b0,
    hsize: 3'b010, hburst: 3'b000, hprot: 4'b0011, hwdata: '0
  };

  // APB (AMBA 2) slave request
  typedef struct packed {
    logic        psel;
    logic        penable;
    logic [31:0] paddr;
    logic        pwrite;
    logic [31:0] pwdata;
  } apb_req_t;

  // GRGPREG address used by the host monitor to reach the fault-injection register
  localparam logic [31:0] GRGPREG_ADDR = 32'hFC00_3000;

  // GRGPREG field layout: one 16-bit slice per core
  localparam int unsigned FI_SLICE_W  = 16;
  localparam int unsigned FI_CORE_A_LSB = 16;  // first core: bits 31:16
  localparam int unsigned FI_CORE_B_LSB = 0;   // second core: bits 15:0
  // Within a slice: bits 1:0 bit-mask, bit 2 write signal, bit 3 reserved
  localparam int unsigned FI_MASK_W   = 2;
  localparam int unsigned FI_WR_BIT   = 2;

endpackage
