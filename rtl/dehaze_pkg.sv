// Shared types and constants of the dehazing accelerator.
//
// The accelerators talk to external DDR through AXI4 master ports and are
// controlled through AXI4-Lite slaves, as in a Zynq programmable-logic design.
// Every bus here is carried as a request struct (driven by the master) and a
// response struct (driven by the slave).  The AXI4 subset used is: INCR bursts
// of 32-bit words, no IDs (every slave answers in order), no locks, caches or
// QoS.  Pixels are stored one per 32-bit word: RGB as {8'h0, B, G, R}, single
// channel images in bits [7:0].
package dehaze_pkg;

  localparam int unsigned AXI_AW = 32;          // byte address width
  localparam int unsigned AXI_DW = 32;          // data width, one pixel per beat

  typedef logic [AXI_AW-1:0] addr_t;
  typedef logic [AXI_DW-1:0] data_t;

  // AXI4 master -> slave
  typedef struct packed {
    logic        ar_valid;
    addr_t       ar_addr;
    logic [7:0]  ar_len;      // beats - 1
    logic        r_ready;
    logic        aw_valid;
    addr_t       aw_addr;
    logic [7:0]  aw_len;      // beats - 1
    logic        w_valid;
    data_t       w_data;
    logic [3:0]  w_strb;
    logic        w_last;
    logic        b_ready;
  } axi_req_t;

  // AXI4 slave -> master
  typedef struct packed {
    logic        ar_ready;
    logic        r_valid;
    data_t       r_data;
    logic [1:0]  r_resp;
    logic        r_last;
    logic        aw_ready;
    logic        w_ready;
    logic        b_valid;
    logic [1:0]  b_resp;
  } axi_rsp_t;

  // AXI4-Lite master -> slave
  typedef struct packed {
    logic        aw_valid;
    addr_t       aw_addr;
    logic        w_valid;
    data_t       w_data;
    logic [3:0]  w_strb;
    logic        b_ready;
    logic        ar_valid;
    addr_t       ar_addr;
    logic        r_ready;
  } axil_req_t;

  // AXI4-Lite slave -> master
  typedef struct packed {
    logic        aw_ready;
    logic        w_ready;
    logic        b_valid;
    logic [1:0]  b_resp;
    logic        ar_ready;
    logic        r_valid;
    data_t       r_data;
    logic [1:0]  r_resp;
  } axil_rsp_t;

  localparam logic [1:0] RESP_OKAY   = 2'b00;
  localparam logic [1:0] RESP_DECERR = 2'b11;

  // Control-slave register map (byte offsets), modelled on the usual
  // HLS block-level control protocol.
  localparam logic [7:0] REG_CTRL    = 8'h00;   // [0] ap_start (W1, self-clearing)
                                                // [1] ap_done  (clear on read)
                                                // [2] ap_idle
  localparam logic [7:0] REG_GIE     = 8'h04;   // [0] global interrupt enable
  localparam logic [7:0] REG_IER     = 8'h08;   // [0] done interrupt enable
  localparam logic [7:0] REG_ISR     = 8'h0C;   // [0] done interrupt status (write 1 to clear)
  localparam logic [7:0] REG_ROWS    = 8'h10;   // image height in pixels
  localparam logic [7:0] REG_COLS    = 8'h18;   // image width in pixels
  localparam logic [7:0] REG_PARAM0  = 8'h20;   // kernel-specific scalar
  localparam logic [7:0] REG_PARAM1  = 8'h28;   // kernel-specific scalar
  localparam logic [7:0] REG_RESULT  = 8'h30;   // kernel-specific result (read only)

  // Pointer-slave (control_r) register map: pointer k at 8'h10 + 8*k.
  localparam int unsigned PTR_BASE   = 'h10;

  localparam int unsigned MAX_ROWS   = 1080;    // Full HD frame
  localparam int unsigned MAX_COLS   = 1920;
  localparam int unsigned DIM_W      = 11;      // bits of a row or column count

  function automatic logic [7:0] min3(input logic [7:0] a, input logic [7:0] b,
                                      input logic [7:0] c);
    logic [7:0] m;
    m = (a < b) ? a : b;
    return (m < c) ? m : c;
  endfunction

  // x * q / 256 with rounding, saturated to 8 bits (q is a Q0.8 factor)
  function automatic logic [7:0] scale_q8(input logic [7:0] x, input logic [8:0] q);
    logic [17:0] p;
    p = {10'd0, x} * {9'd0, q} + 18'd128;
    return (p[17:16] != 2'b00) ? 8'hFF : p[15:8];
  endfunction

endpackage
