// tmac_pkg: types and constants shared by the token-managed admission
// control (TMAC) blocks.
//
// The AXI channel payloads are kept as packed structs so that a whole
// channel can be carried through the ingress gates and the top as one
// signal, with separate valid/ready bits beside it. The 64-bit data beat
// follows the evaluation set-up (one 64-bit beat per target cycle); the
// address, ID and burst-length widths are this design's own choice
// (AXI3-style 4-bit burst length, so 16-beat bursts fit).
package tmac_pkg;

  localparam int unsigned AXI_ADDR_W = 32;
  localparam int unsigned AXI_DATA_W = 64;
  localparam int unsigned AXI_ID_W   = 4;
  localparam int unsigned AXI_LEN_W  = 4;

  // Read or write address channel payload (AR / AW).
  typedef struct packed {
    logic [AXI_ID_W-1:0]   id;
    logic [AXI_ADDR_W-1:0] addr;
    logic [AXI_LEN_W-1:0]  len;   // beats - 1
  } axi_addr_t;

  // Read data channel payload (R).
  typedef struct packed {
    logic [AXI_ID_W-1:0]   id;
    logic [AXI_DATA_W-1:0] data;
    logic [1:0]            resp;
    logic                  last;
  } axi_r_t;

  // Write data channel payload (W).
  typedef struct packed {
    logic [AXI_DATA_W-1:0]   data;
    logic [AXI_DATA_W/8-1:0] strb;
    logic                    last;
  } axi_w_t;

  // Write response channel payload (B).
  typedef struct packed {
    logic [AXI_ID_W-1:0] id;
    logic [1:0]          resp;
  } axi_b_t;

endpackage
