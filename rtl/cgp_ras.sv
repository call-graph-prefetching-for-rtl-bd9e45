// cgp_ras: return address stack extended for call graph prefetching.
//
// A conventional return address stack predicts only the address a return
// goes back to. The CGHC also needs the start address of the function being
// returned to, so this stack keeps, next to each return address, the start
// address of the caller, and a register holds the start address of the
// function currently executing:
//   call (target F, return address R): push {R, current}; current <= F
//   return: pop {R, P}; predict R; current <= P
// Each call or return is turned into one cgp_event_t for cghc_ctrl,
// registered, so the CGHC sees it the cycle after the prediction:
//   call   : pf_key = F, upd_key = P (the function that was current)
//   return : pf_key = P (popped),    upd_key = F (the function that was current)
// A key that is not known (current function before the first call, pop of
// an empty stack) is flagged invalid and its CGHC access is skipped. The
// stack is circular: a push onto a full stack overwrites the oldest entry.
// DEPTH is this design's choice; call and return must not be asserted in
// the same cycle.
module cgp_ras
  import cgp_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       call_valid,
  input  addr_t      call_target,    // predicted start address of the callee
  input  addr_t      call_ret_addr,  // return address pushed by the call
  input  logic       ret_valid,
  // prediction for the return, valid in the same cycle as ret_valid
  output logic       ret_pred_valid,
  output addr_t      ret_pred_addr,
  output addr_t      cur_func,
  output logic       cur_func_valid,
  // event for the CGHC, one cycle later
  output logic       ev_valid,
  output cgp_event_t ev
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  typedef struct packed {
    addr_t ret_addr;
    addr_t caller;
    logic  caller_vld;
  } ras_entry_t;

  ras_entry_t      stk [DEPTH];
  logic [PW-1:0]   top_q;     // index of the next free slot
  logic [PW:0]     cnt_q;     // valid entries, saturates at DEPTH
  logic [PW-1:0]   top_m1;
  ras_entry_t      popped;
  logic            pop_ok;

  assign top_m1  = (top_q == '0) ? PW'(DEPTH-1) : top_q - 1'b1;
  assign popped  = stk[top_m1];
  assign pop_ok  = (cnt_q != 0);

  assign ret_pred_valid = ret_valid && pop_ok;
  assign ret_pred_addr  = popped.ret_addr;

  always_ff @(posedge clk) begin
    if (call_valid) stk[top_q] <= '{ret_addr: call_ret_addr, caller: cur_func, caller_vld: cur_func_valid};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      top_q          <= '0;
      cnt_q          <= '0;
      cur_func       <= '0;
      cur_func_valid <= 1'b0;
      ev_valid       <= 1'b0;
      ev             <= '0;
    end else begin
      ev_valid <= call_valid || ret_valid;
      if (call_valid) begin
        top_q          <= (top_q == PW'(DEPTH-1)) ? '0 : top_q + 1'b1;
        if (cnt_q != (PW+1)'(DEPTH)) cnt_q <= cnt_q + 1'b1;
        cur_func       <= call_target;
        cur_func_valid <= 1'b1;
        ev             <= '{kind: EV_CALL, pf_vld: 1'b1, pf_key: call_target,
                            upd_vld: cur_func_valid, upd_key: cur_func};
      end else if (ret_valid) begin
        ev             <= '{kind: EV_RET, pf_vld: pop_ok && popped.caller_vld, pf_key: popped.caller,
                            upd_vld: cur_func_valid, upd_key: cur_func};
        if (pop_ok) begin
          top_q          <= top_m1;
          cnt_q          <= cnt_q - 1'b1;
          cur_func       <= popped.caller;
          cur_func_valid <= popped.caller_vld;
        end else begin
          cur_func_valid <= 1'b0;
        end
      end
    end
  end

  // a call and a return are never predicted in the same cycle
  assert property (@(posedge clk) disable iff (!rst_n) !(call_valid && ret_valid));

endmodule
