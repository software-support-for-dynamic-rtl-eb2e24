// pr_pkg: types and constants shared by the reconfigurable accelerator system.
//
// The system is a processor plus an FPGA fabric split into a static region and
// N reconfigurable slots. Every accelerator that can be loaded into a slot
// exposes the same interface: an AXI4-Lite control slave, an AXI4 memory
// master, an interrupt line and an 8-bit debug "state_out" port. This package
// holds the flattened AXI bundles (as packed structs, so that they can travel
// through ports and arrays), the operation identifiers, the control register
// map and the default problem sizes (800x600 RGB images, 512x512 matrices).
//
// AXI simplifications (this design's choice): 32-bit addresses and data, all
// bursts are INCR with 4-byte beats, so AxSIZE/AxBURST are implied and not
// carried; IDs, caching and protection fields are omitted.
package pr_pkg;

  localparam int AW = 32;
  localparam int DW = 32;

  // AXI4-Lite, master-to-slave half
  typedef struct packed {
    logic [AW-1:0] awaddr;
    logic          awvalid;
    logic [DW-1:0] wdata;
    logic [3:0]    wstrb;
    logic          wvalid;
    logic          bready;
    logic [AW-1:0] araddr;
    logic          arvalid;
    logic          rready;
  } axil_req_t;

  // AXI4-Lite, slave-to-master half
  typedef struct packed {
    logic          awready;
    logic          wready;
    logic [1:0]    bresp;
    logic          bvalid;
    logic          arready;
    logic [DW-1:0] rdata;
    logic [1:0]    rresp;
    logic          rvalid;
  } axil_rsp_t;

  // AXI4 memory master, master-to-slave half (INCR bursts of 32-bit beats)
  typedef struct packed {
    logic [AW-1:0] araddr;
    logic [7:0]    arlen;
    logic          arvalid;
    logic          rready;
    logic [AW-1:0] awaddr;
    logic [7:0]    awlen;
    logic          awvalid;
    logic [DW-1:0] wdata;
    logic [3:0]    wstrb;
    logic          wlast;
    logic          wvalid;
    logic          bready;
  } axi_req_t;

  // AXI4 memory master, slave-to-master half
  typedef struct packed {
    logic          arready;
    logic [DW-1:0] rdata;
    logic [1:0]    rresp;
    logic          rlast;
    logic          rvalid;
    logic          awready;
    logic          wready;
    logic [1:0]    bresp;
    logic          bvalid;
  } axi_rsp_t;

  localparam logic [1:0] RESP_OKAY   = 2'b00;
  localparam logic [1:0] RESP_DECERR = 2'b11;

  // Hardware operations (the value is also the accelerator's id register)
  typedef enum logic [7:0] {
    OP_NONE  = 8'd0,
    OP_SOBEL = 8'd1,
    OP_BLUR  = 8'd2,
    OP_SHARP = 8'd3,
    OP_MULT  = 8'd4
  } op_id_t;
  localparam int N_OPS = 4;

  // Control register map of an accelerator (byte offsets)
  localparam logic [7:0] REG_CTRL = 8'h00;  // bit0 start, bit1 done (clear on read), bit2 idle, bit3 ready
  localparam logic [7:0] REG_GIE  = 8'h04;  // bit0 global interrupt enable
  localparam logic [7:0] REG_IER  = 8'h08;  // bit0 done interrupt enable
  localparam logic [7:0] REG_ISR  = 8'h0C;  // bit0 done interrupt status, write 1 to toggle
  localparam logic [7:0] REG_ID   = 8'h10;  // accelerator identifier (read only)
  localparam logic [7:0] REG_ARGS = 8'h20;  // args[k] at REG_ARGS + 4*k
  localparam int ARGS_SIZE = 4;

  // Default problem sizes the accelerators are built for
  localparam int IMG_W = 800;
  localparam int IMG_H = 600;
  localparam int MAT_N = 512;

  // AXI4 limits
  localparam int MAX_BURST = 256;  // beats per burst

  // Pixel word: {8'h00, R, G, B}
  typedef struct packed {
    logic [7:0] pad;
    logic [7:0] r;
    logic [7:0] g;
    logic [7:0] b;
  } pixel_t;

endpackage
