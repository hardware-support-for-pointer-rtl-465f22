// hat_monitor_fsm: the monitor that drives the specialised HAT.
//
// It follows the document's state diagram. In S it waits for a request type
// from the queue: 0 leads to R (remove), 1 to I (insert), 2 to F (find). In
// R, I or F it waits for the next queue word, the object ID X, and issues
// Remove(X), Insert(X) or Find(X) to the HAT, then waits in W for the HAT's
// answer. An answer of 1 returns to S; an answer of 0 (an ID that is not
// live, i.e. a temporal pointer-safety violation) enters E, where the monitor
// stops, holds `error` high and keeps the offending request type and ID. A
// word is only taken from the queue in a state that waits for one; otherwise
// it stays queued.
//
// Own choices, where the diagram is silent: a request type other than 0, 1,
// 2 is discarded in S; E is left only by reset; the HAT request is a
// valid/ready handshake, so the transition out of R, I or F needs both an ID
// in the queue and a HAT that is ready. Each transition takes one cycle.
module hat_monitor_fsm
  import hat_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // from the request queue
  input  logic              q_valid,
  output logic              q_ready,
  input  logic [WORD_W-1:0] q_data,
  // to / from the HAT
  output logic              hat_req_valid,
  input  logic              hat_req_ready,
  output hat_op_e           hat_req_op,
  output logic [WORD_W-1:0] hat_req_key,
  input  logic              hat_resp_valid,
  input  logic              hat_resp_ok,
  // result
  output logic              error,
  output hat_op_e           err_op,
  output logic [WORD_W-1:0] err_id,
  output logic              done_pulse    // one request completed without error
);
  typedef enum logic [2:0] {ST_S, ST_R, ST_I, ST_F, ST_W, ST_E} state_e;
  state_e state;
  hat_op_e cur_op;

  always_comb begin
    unique case (state)
      ST_R:    hat_req_op = HAT_REMOVE;
      ST_I:    hat_req_op = HAT_INSERT;
      default: hat_req_op = HAT_FIND;
    endcase
  end

  assign hat_req_valid = (state inside {ST_R, ST_I, ST_F}) && q_valid;
  assign hat_req_key   = q_data;
  assign q_ready       = (state == ST_S) ||
                         ((state inside {ST_R, ST_I, ST_F}) && hat_req_ready);
  assign error         = (state == ST_E);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= ST_S;
      cur_op     <= HAT_FIND;
      err_op     <= HAT_FIND;
      err_id     <= '0;
      done_pulse <= 1'b0;
    end else begin
      done_pulse <= 1'b0;
      unique case (state)
        ST_S: if (q_valid) begin
          if (q_data == QCODE_REMOVE)      state <= ST_R;
          else if (q_data == QCODE_INSERT) state <= ST_I;
          else if (q_data == QCODE_FIND)   state <= ST_F;
        end
        ST_R, ST_I, ST_F: if (q_valid && hat_req_ready) begin
          cur_op <= hat_req_op;
          err_id <= q_data;
          state  <= ST_W;
        end
        ST_W: if (hat_resp_valid) begin
          if (hat_resp_ok) begin
            state      <= ST_S;
            done_pulse <= 1'b1;
          end else begin
            err_op <= cur_op;
            state  <= ST_E;
          end
        end
        default: state <= ST_E;
      endcase
    end
  end

  a_no_resp_outside_w: assert property (@(posedge clk) disable iff (!rst_n)
    hat_resp_valid |-> state == ST_W);
endmodule
