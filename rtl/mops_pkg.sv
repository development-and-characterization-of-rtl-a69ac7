// mops_pkg: types, constants and helper functions shared by the MOPS digital
// logic. A CAN message is held without protocol overhead as an 11-bit
// identifier plus eight data bytes (75 bits, the width of the on-chip
// receive and transmit buffers). Byte 0 is the first byte on the bus and
// sits in the upper eight data bits. The chip always works with eight data
// bytes; the DLC is not stored (a design choice that matches the 75-bit
// buffer width). CANopen constants follow the communication object
// identifiers (COB-IDs) and SDO command bytes of the MOPS protocol; the
// abort codes are the ones the chip reports.
package mops_pkg;

  typedef struct packed {
    logic [10:0] id;
    logic [63:0] data;
  } can_msg_t;

  // CAN node configuration held in the node's registers.
  typedef struct packed {
    logic [7:0]  brp;    // clocks per time quantum
    logic [4:0]  tseg1;  // propagation + phase segment 1, in time quanta
    logic [3:0]  tseg2;  // phase segment 2, in time quanta
    logic [1:0]  sjw;    // synchronisation jump width - 1
    logic [10:0] acc_code;
    logic [10:0] acc_mask; // 1 = bit must match acc_code
  } can_cfg_t;

  // Register addresses of the CAN node.
  localparam logic [1:0] REG_BRP    = 2'd0;
  localparam logic [1:0] REG_TIMING = 2'd1;
  localparam logic [1:0] REG_ACODE  = 2'd2;
  localparam logic [1:0] REG_AMASK  = 2'd3;

  // COB-ID function codes.
  localparam logic [10:0] COB_NMT_RESET = 11'h000;
  localparam logic [10:0] COB_SDO_TX    = 11'h580;
  localparam logic [10:0] COB_SDO_RX    = 11'h600;
  localparam logic [10:0] COB_GUARD     = 11'h700;

  // Message types recognised by the CANopen message type decoder.
  typedef enum logic [2:0] {
    MT_NONE, MT_RESET, MT_SDO, MT_GUARD, MT_PDO, MT_SYNC, MT_EMCY
  } msg_type_t;

  // SDO failure causes, translated into abort codes by sdo_failure_response.
  typedef enum logic [3:0] {
    SDO_ERR_TIMEOUT, SDO_ERR_CMD, SDO_ERR_ACCESS, SDO_ERR_WO, SDO_ERR_RO,
    SDO_ERR_NO_OBJ, SDO_ERR_HW, SDO_ERR_COMM_TIMEOUT, SDO_ERR_NO_SUB,
    SDO_ERR_GENERAL
  } sdo_err_t;

  // NMT state byte sent in node guarding / sign-in (operational = 05h).
  localparam logic [6:0] NMT_STATE_OPERATIONAL = 7'h05;

  function automatic logic [7:0] msg_byte(input logic [63:0] d, input int unsigned i);
    return d[63-8*i -: 8];
  endfunction

  // CRC-15 of CAN (polynomial 4599h), one bit per call.
  function automatic logic [14:0] crc15_step(input logic [14:0] crc, input logic b);
    logic fb;
    fb = b ^ crc[14];
    crc15_step = {crc[13:0], 1'b0} ^ (fb ? 15'h4599 : 15'h0000);
  endfunction

endpackage
