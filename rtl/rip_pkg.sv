// rip_pkg: types and constants shared by the RIP (Read_Init_Parameters)
// chip. The sizes follow the chip: an 8-bit data bus, a 4-bit INITNUM bus,
// eight 8-bit TOS (type of service) table entries and eight parameter
// registers addressed by the 3-bit register counter. The encodings of the
// memory request and of the parameter register order are this design's
// own; the order of the parameters is the order in which the task reads them.
package rip_pkg;

  localparam int unsigned DATA_W    = 8;  // bidirectional data bus
  localparam int unsigned NIB_W     = 4;  // INITNUM bus / address chunk
  localparam int unsigned IDX_W     = 3;  // REG.CTR, TOS.COL.*, TOS.ROW.*
  localparam int unsigned TOS_DEPTH = 8;  // TOS table words
  localparam int unsigned NUM_PARAM = 8;  // parameter registers

  // Kind of Memory.Out_request issued on the memory channel.
  typedef enum logic [1:0] {
    MEM_LOAD_ADDRESS = 2'd0,   // forward one address chunk
    MEM_SEND_DATUM   = 2'd1,   // RIP drives an octet to memory (test mode)
    MEM_RECV_DATUM   = 2'd2    // memory drives an octet to RIP (normal mode)
  } mem_op_e;

  // Register counter index of each parameter register.
  typedef enum logic [IDX_W-1:0] {
    P_MAX_PACKET_LO = 3'd0,
    P_MAX_PACKET_HI = 3'd1,
    P_ADDR_LENGTH   = 3'd2,
    P_TIMEOUT_LO    = 3'd3,
    P_TIMEOUT_HI    = 3'd4,
    P_ACK_TYPE      = 3'd5,
    P_TOS_COL       = 3'd6,   // row size of the TOS table (last column index)
    P_TOS_ROW       = 3'd7    // number of types of service (last row index)
  } param_idx_e;

  // Stored initialization parameters.
  typedef struct packed {
    logic [DATA_W-1:0] max_packet_lo;
    logic [DATA_W-1:0] max_packet_hi;
    logic [DATA_W-1:0] addr_length;
    logic [DATA_W-1:0] timeout_lo;
    logic [DATA_W-1:0] timeout_hi;
    logic              ack_type;
    logic [IDX_W-1:0]  tos_col;
    logic [IDX_W-1:0]  tos_row;
  } params_t;

  // Requests from the control unit to the datapath. Counter and register
  // write requests are one clock wide; re is a level.
  typedef struct packed {
    logic init_lod;   // INITNUM.REG load from the INITNUM bus
    logic ictr_inc;   // INITNUM.CTR
    logic ictr_clr;
    logic rctr_inc;   // REG.CTR
    logic rctr_max;
    logic col_inc;    // TOS.COL.CTR
    logic col_max;
    logic row_inc;    // TOS.ROW.CTR
    logic row_max;
    logic reg_ena;    // address the parameter registers
    logic tos_ena;    // address the TOS table
    logic we;         // write the addressed register from the data bus
    logic re;         // drive the addressed register onto the data bus
  } dp_ctrl_t;

  // Completion and condition signals from the datapath to the control unit.
  typedef struct packed {
    logic init_done;
    logic ictr_done;
    logic rctr_done;
    logic col_done;
    logic row_done;
    logic reg_done;
    logic tos_done;
    logic initnum_eq;  // INITNUM.CTR = INITNUM.REG
    logic rctr_eq7;    // REG.CTR = 111
    logic col_eq;      // TOS.COL.CTR = TOS.COL.REG
    logic row_eq;      // TOS.ROW.CTR = TOS.ROW.REG
  } dp_stat_t;

endpackage
