// rip_control: the control unit of the RIP chip.
//
// Carries out the Read_Init_Parameters task. A Go request from Inm_Out
// brings the 4-bit INITNUM. INITNUM = 0 selects TEST mode, anything else
// NORMAL mode.
//   NORMAL: accept INITNUM address chunks from Inm_Srv (Srv_req) and forward
//     each to the memory as a LOAD_ADDRESS request; then receive the eight
//     parameter octets from the memory into the parameter registers; then
//     receive the TOS table, row by row, each row holding TOS.COL.REG + 1
//     entries and the table TOS.ROW.REG + 1 rows.
//   TEST: send the eight parameter registers and the TOS table, in the same
//     order, to the memory ("dump" of the local store).
// If the table does not fit in the eight TOS words, the Go request is
// answered with go_bad high (bad_srv_command), otherwise with go_bad low
// (send_ok).
//
// Interfaces. The three external channels (Go, Srv_req, memory) use a
// four-phase request/acknowledge handshake: request up, acknowledge up,
// request down, acknowledge down. Srv_req is acknowledged only after the
// memory has acknowledged the forwarded chunk, so the chunk needs no latch.
// For a SEND the addressed register drives the data bus first and the
// memory request rises only when pad_stable says the pads have settled.
// Each datapath request is one clock wide (re is a level) and the state
// waits for its DONE.
//
// The unit is one-hot coded, as the chip's was. The sequence follows the
// task's Ada body; the chip's unit had 12 states and used conditional
// outputs to save states, while this one has a state per datapath request
// (20), which is this design's own arrangement. How the table overflow is
// checked (after the word at index 7, the last word, unless it was the last
// entry of the table) is this design's reading of the task's check.
module rip_control
  import rip_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  // Go (from Inm_Out)
  input  logic     go_req,
  output logic     go_ack,
  output logic     go_bad,
  // Srv_req (from Inm_Srv)
  input  logic     srv_req,
  output logic     srv_ack,
  // Memory.Out_request (to the memory module)
  output logic     mem_req,
  output mem_op_e  mem_op,
  input  logic     mem_ack,
  input  logic     pad_stable,
  // datapath
  output dp_ctrl_t ctrl,
  input  dp_stat_t stat,
  // state probe and mode
  output logic [19:0] state_onehot,
  output logic     test_mode
);

  typedef enum logic [19:0] {
    S_IDLE    = 20'd1 << 0,
    S_LOD     = 20'd1 << 1,   // load INITNUM.REG
    S_CLR     = 20'd1 << 2,   // clear INITNUM.CTR, then decide the mode
    S_CINC    = 20'd1 << 3,   // INITNUM.CTR + 1
    S_SRV     = 20'd1 << 4,   // wait for an address chunk
    S_SRV_MEM = 20'd1 << 5,   // chunk forwarded, wait for memory
    S_SRV_RTZ = 20'd1 << 6,   // return-to-zero of both channels
    S_PMAX    = 20'd1 << 7,   // REG.CTR := -1
    S_PINC    = 20'd1 << 8,   // REG.CTR + 1 (parameters)
    S_X_RD    = 20'd1 << 9,   // SEND: register on the bus, wait for pads
    S_X_MEMS  = 20'd1 << 10,  // SEND: wait memory acknowledge
    S_X_MEMR  = 20'd1 << 11,  // RECV: wait memory data
    S_X_WR    = 20'd1 << 12,  // RECV: write the register
    S_X_RTZ   = 20'd1 << 13,  // memory return-to-zero, loop tests
    S_T_RMAX  = 20'd1 << 14,  // TOS.ROW.CTR := -1
    S_T_CMAX  = 20'd1 << 15,  // TOS.COL.CTR := -1
    S_T_RINC  = 20'd1 << 16,  // TOS.ROW.CTR + 1
    S_T_CINC  = 20'd1 << 17,  // TOS.COL.CTR + 1
    S_T_XINC  = 20'd1 << 18,  // REG.CTR + 1 (table index)
    S_DONE    = 20'd1 << 19   // answer Go
  } state_e;

  state_e state;
  logic   bank_tos;   // transfers address the TOS table, not the registers

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      bank_tos  <= 1'b0;
      test_mode <= 1'b0;
      go_ack    <= 1'b0;
      go_bad    <= 1'b0;
      srv_ack   <= 1'b0;
      mem_req   <= 1'b0;
      mem_op    <= MEM_LOAD_ADDRESS;
      ctrl      <= '0;
    end else begin
      // one-clock requests
      ctrl.init_lod <= 1'b0;
      ctrl.ictr_inc <= 1'b0;
      ctrl.ictr_clr <= 1'b0;
      ctrl.rctr_inc <= 1'b0;
      ctrl.rctr_max <= 1'b0;
      ctrl.col_inc  <= 1'b0;
      ctrl.col_max  <= 1'b0;
      ctrl.row_inc  <= 1'b0;
      ctrl.row_max  <= 1'b0;
      ctrl.we       <= 1'b0;

      unique case (state)
        S_IDLE: if (go_req) begin
          go_bad        <= 1'b0;
          bank_tos      <= 1'b0;
          ctrl.init_lod <= 1'b1;
          state         <= S_LOD;
        end
        S_LOD: if (stat.init_done) begin
          ctrl.ictr_clr <= 1'b1;
          state         <= S_CLR;
        end
        S_CLR: if (stat.ictr_done) begin
          // INITNUM.CTR is 0 now: equality means INITNUM = 0, TEST mode
          test_mode <= stat.initnum_eq;
          if (stat.initnum_eq) begin
            ctrl.rctr_max <= 1'b1;
            state         <= S_PMAX;
          end else begin
            ctrl.ictr_inc <= 1'b1;
            state         <= S_CINC;
          end
        end
        S_CINC: if (stat.ictr_done) state <= S_SRV;
        S_SRV: if (srv_req) begin
          mem_op  <= MEM_LOAD_ADDRESS;
          mem_req <= 1'b1;
          state   <= S_SRV_MEM;
        end
        S_SRV_MEM: if (mem_ack) begin
          mem_req <= 1'b0;
          srv_ack <= 1'b1;
          state   <= S_SRV_RTZ;
        end
        S_SRV_RTZ: if (!mem_ack && !srv_req) begin
          srv_ack <= 1'b0;
          if (stat.initnum_eq) begin
            ctrl.rctr_max <= 1'b1;
            state         <= S_PMAX;
          end else begin
            ctrl.ictr_inc <= 1'b1;
            state         <= S_CINC;
          end
        end
        S_PMAX: if (stat.rctr_done) begin
          ctrl.rctr_inc <= 1'b1;
          state         <= S_PINC;
        end
        S_PINC, S_T_XINC: if (stat.rctr_done) begin
          // start one octet transfer on the addressed bank
          ctrl.reg_ena <= !bank_tos;
          ctrl.tos_ena <= bank_tos;
          if (test_mode) begin
            ctrl.re <= 1'b1;
            state   <= S_X_RD;
          end else begin
            mem_op  <= MEM_RECV_DATUM;
            mem_req <= 1'b1;
            state   <= S_X_MEMR;
          end
        end
        S_X_RD: if ((bank_tos ? stat.tos_done : stat.reg_done) && pad_stable) begin
          mem_op  <= MEM_SEND_DATUM;
          mem_req <= 1'b1;
          state   <= S_X_MEMS;
        end
        S_X_MEMS: if (mem_ack) begin
          mem_req      <= 1'b0;
          ctrl.re      <= 1'b0;
          ctrl.reg_ena <= 1'b0;
          ctrl.tos_ena <= 1'b0;
          state        <= S_X_RTZ;
        end
        S_X_MEMR: if (mem_ack) begin
          ctrl.we <= 1'b1;
          state   <= S_X_WR;
        end
        S_X_WR: if (bank_tos ? stat.tos_done : stat.reg_done) begin
          mem_req      <= 1'b0;
          ctrl.reg_ena <= 1'b0;
          ctrl.tos_ena <= 1'b0;
          state        <= S_X_RTZ;
        end
        S_X_RTZ: if (!mem_ack) begin
          if (!bank_tos) begin
            if (stat.rctr_eq7) begin
              // all eight parameters done: on to the TOS table
              bank_tos     <= 1'b1;
              ctrl.row_max <= 1'b1;
              state        <= S_T_RMAX;
            end else begin
              ctrl.rctr_inc <= 1'b1;
              state         <= S_PINC;
            end
          end else if (stat.rctr_eq7 && !(stat.col_eq && stat.row_eq)) begin
            // last TOS word used but the table is not complete
            go_bad <= 1'b1;
            go_ack <= 1'b1;
            state  <= S_DONE;
          end else if (!stat.col_eq) begin
            ctrl.col_inc <= 1'b1;
            state        <= S_T_CINC;
          end else if (!stat.row_eq) begin
            ctrl.col_max <= 1'b1;
            state        <= S_T_CMAX;
          end else begin
            go_ack <= 1'b1;
            state  <= S_DONE;
          end
        end
        S_T_RMAX: if (stat.row_done) begin
          ctrl.col_max <= 1'b1;
          state        <= S_T_CMAX;
        end
        S_T_CMAX: if (stat.col_done) begin
          ctrl.row_inc <= 1'b1;
          state        <= S_T_RINC;
        end
        S_T_RINC: if (stat.row_done) begin
          ctrl.col_inc <= 1'b1;
          state        <= S_T_CINC;
        end
        S_T_CINC: if (stat.col_done) begin
          ctrl.rctr_inc <= 1'b1;
          state         <= S_T_XINC;
        end
        S_DONE: if (!go_req) begin
          go_ack <= 1'b0;
          state  <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign state_onehot = state;

  // four-phase rules of the external channels
  a_mem_hold: assert property (@(posedge clk) disable iff (!rst_n)
                               mem_req && !mem_ack |=> mem_req)
    else $error("memory request withdrawn before acknowledge");
  a_go_ack: assert property (@(posedge clk) disable iff (!rst_n)
                             $rose(go_ack) |-> go_req)
    else $error("Go acknowledged without a request");
  a_srv_ack: assert property (@(posedge clk) disable iff (!rst_n)
                              $rose(srv_ack) |-> srv_req)
    else $error("Srv_req acknowledged without a request");
  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot(state))
    else $error("state is not one-hot");

endmodule
