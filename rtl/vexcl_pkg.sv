// vexcl_pkg: types and constants shared by the kernels of the two ported
// applications (affine transformation and sparse matrix-vector product).
//
// Memory masters: every kernel buffer argument is served by a simple
// request/response memory port instead of a full AXI4 master. A request is a
// word address (64-bit words, one buffer element per word), a write flag and
// write data; it is accepted when `ready` is high. Reads return their data,
// in order, with `rvalid` some cycles later; writes return nothing. This port
// is this design's own simplification of the kernels' AXI4 memory bundles.
//
// Number formats: the affine kernel follows the document's fixed-point
// optimization (inputs ap_fixed<18,7>, sums and result ap_fixed<64,54>, both
// rounding and saturating). The formats of the SpMV kernels are this design's
// own choice (the document ran them in double precision), see SPMV_*.
package vexcl_pkg;

  localparam int unsigned ADDR_W = 32;   // word address width
  localparam int unsigned DATA_W = 64;   // memory word width (one double / ulong)

  typedef struct packed {
    logic              valid;
    logic              we;
    logic [ADDR_W-1:0] addr;
    logic [DATA_W-1:0] wdata;
  } mem_req_t;

  typedef struct packed {
    logic              ready;
    logic              rvalid;
    logic [DATA_W-1:0] rdata;
  } mem_rsp_t;

  // AXI4-Lite control bus of one kernel, host (master) to kernel and back.
  typedef struct packed {
    logic        awvalid;
    logic [7:0]  awaddr;
    logic        wvalid;
    logic [31:0] wdata;
    logic [3:0]  wstrb;
    logic        bready;
    logic        arvalid;
    logic [7:0]  araddr;
    logic        rready;
  } axil_req_t;

  typedef struct packed {
    logic        awready;
    logic        wready;
    logic        bvalid;
    logic [1:0]  bresp;
    logic        arready;
    logic        rvalid;
    logic [31:0] rdata;
    logic [1:0]  rresp;
  } axil_rsp_t;

  // ap_fixed<W, I, Q, O>: W total bits, I integer bits (sign included).
  localparam int unsigned FIX_W  = 18;   // fix_t  = ap_fixed<18, 7, AP_RND, AP_SAT>
  localparam int unsigned FIX_I  = 7;
  localparam int unsigned LFIX_W = 64;   // lfix_t = ap_fixed<64, 54, AP_RND, AP_SAT>
  localparam int unsigned LFIX_I = 54;

  // SpMV application value format (own choice) and accumulator.
  localparam int unsigned SPMV_W   = 32; // ap_fixed<32,16>, truncate + wrap
  localparam int unsigned SPMV_I   = 16;
  localparam int unsigned SPMV_ACC = 64; // ap_fixed<64,48> accumulator
  localparam int unsigned SPMV_ACCI= 48;

  // ELL padding marker: column index (ulong)(-1).
  localparam logic [DATA_W-1:0] ELL_PAD = '1;

  // Kernel control register map (byte offsets on the AXI4-Lite slave).
  localparam logic [7:0] REG_CTRL = 8'h00;  // bit0 start, bit1 done, bit2 idle
  localparam logic [7:0] REG_ARG0 = 8'h10;  // argument i at REG_ARG0 + 4*i

endpackage
