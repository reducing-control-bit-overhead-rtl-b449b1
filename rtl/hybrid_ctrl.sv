// Controller of the hybrid X-masking / time-multiplexed X-canceling compactor.
//
// The tester drives three commands, each taken only when the controller is
// idle (cancel_req also during a shift):
//   load_start : the next CHAIN_LEN cycles write one mask column each
//                (mask_we, mask_waddr = 0 .. CHAIN_LEN-1); load_done pulses on
//                the last one.
//   pat_start  : the next CHAIN_LEN shift cycles unload one pattern; each
//                shift cycle asserts scan_shift and reads mask column
//                mask_raddr = 0 .. CHAIN_LEN-1; pat_done pulses on the last.
//   cancel_req : the scan shift halts for Q cycles (cancel_active), one X-free
//                combination per cycle, the first in the cycle of cancel_req
//                itself; misr_clear pulses with the last one and the
//                controller returns to where it was (idle, or the next shift
//                of the interrupted pattern).
// A cancel requested in a shift cycle takes that cycle instead of the shift,
// so no bit is lost and a halt costs exactly Q cycles.
// Halting the shift for the canceling and Q cycles per halt follow the
// described time-multiplexing scheme; the command interface, the clearing of
// the MISR after each halt and the one-cycle command latency are this
// design's choices. Asynchronous active-low reset to idle.
module hybrid_ctrl #(
  parameter int unsigned CHAIN_LEN = xh_pkg::DEF_CHAIN_LEN,
  parameter int unsigned Q         = xh_pkg::DEF_Q,
  localparam int unsigned AW = (CHAIN_LEN > 1) ? $clog2(CHAIN_LEN) : 1,
  localparam int unsigned QW = (Q > 1) ? $clog2(Q) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load_start,
  input  logic          pat_start,
  input  logic          cancel_req,
  output logic          mask_we,
  output logic [AW-1:0] mask_waddr,
  output logic [AW-1:0] mask_raddr,
  output logic          scan_shift,
  output logic          cancel_active,
  output logic          misr_clear,
  output logic          pat_done,
  output logic          load_done,
  output logic          busy
);
  import xh_pkg::*;

  localparam logic [AW-1:0] LAST_POS = AW'(CHAIN_LEN - 1);
  localparam logic [QW-1:0] LAST_Q   = QW'(Q - 1);

  ctrl_state_e  state, ret_state;
  logic [AW-1:0] pos;   // shift or load position
  logic [QW-1:0] qcnt;  // index of the X-free combination in ST_CANCEL

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= ST_IDLE;
      ret_state <= ST_IDLE;
      pos       <= '0;
      qcnt      <= '0;
    end else begin
      unique case (state)
        ST_IDLE: begin
          if (cancel_req) begin
            if (Q > 1) begin
              state     <= ST_CANCEL;
              ret_state <= ST_IDLE;
              qcnt      <= QW'(1);
            end
          end else if (load_start) begin
            state <= ST_LOAD;
            pos   <= '0;
          end else if (pat_start) begin
            state <= ST_SHIFT;
            pos   <= '0;
          end
        end
        ST_LOAD: begin
          if (pos == LAST_POS) state <= ST_IDLE;
          else                 pos   <= pos + 1'b1;
        end
        ST_SHIFT: begin
          if (cancel_req) begin
            if (Q > 1) begin
              state     <= ST_CANCEL;
              ret_state <= ST_SHIFT;
              qcnt      <= QW'(1);
            end
          end else if (pos == LAST_POS) begin
            state <= ST_IDLE;
          end else begin
            pos <= pos + 1'b1;
          end
        end
        ST_CANCEL: begin
          if (qcnt == LAST_Q) state <= ret_state;
          else                qcnt  <= qcnt + 1'b1;
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  always_comb begin
    mask_we       = (state == ST_LOAD);
    mask_waddr    = pos;
    mask_raddr    = pos;
    scan_shift    = (state == ST_SHIFT) && !cancel_req;
    cancel_active = (state == ST_CANCEL) ||
                    (cancel_req && (state == ST_IDLE || state == ST_SHIFT));
    misr_clear    = cancel_active &&
                    ((state == ST_CANCEL) ? (qcnt == LAST_Q) : (Q == 1));
    pat_done      = scan_shift && (pos == LAST_POS);
    load_done     = (state == ST_LOAD) && (pos == LAST_POS);
    busy          = (state != ST_IDLE);
  end

  // Commands are only meaningful when they can be taken.
  a_no_start_when_busy: assert property (@(posedge clk)
      busy |-> !(load_start || pat_start))
    else $error("load_start/pat_start while the controller is busy");

endmodule
