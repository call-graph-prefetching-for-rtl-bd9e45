// tb_cgp_ras: checks the modified return address stack against a queue
// model: predicted return addresses, the caller start address tracked for
// every return, the CGHC events (keys and validity, one cycle after the
// call or return), overflow wrap-around and underflow.
module tb_cgp_ras;
  import cgp_pkg::*;

  localparam int unsigned DEPTH = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       call_valid = 0, ret_valid = 0;
  addr_t      call_target = '0, call_ret_addr = '0;
  logic       ret_pred_valid, cur_func_valid, ev_valid;
  addr_t      ret_pred_addr, cur_func;
  cgp_event_t ev;

  cgp_ras #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .call_valid, .call_target, .call_ret_addr,
    .ret_valid, .ret_pred_valid, .ret_pred_addr, .cur_func, .cur_func_valid, .ev_valid, .ev);

  int unsigned checks = 0, failures = 0;
  int unsigned n_over = 0, n_under = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  typedef struct { addr_t ret; addr_t caller; bit cv; } fr_t;
  fr_t   stk [$];
  addr_t cur;
  bit    cur_v;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cur = 0; cur_v = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      automatic bit do_ret = (n % 300 > 250) ? 1 : ((n % 300 > 200) ? 0 : ($urandom_range(99) < 48));
      automatic cgp_event_t exp_ev;
      @(negedge clk);
      if (do_ret) begin
        ret_valid = 1; #1;
        check(ret_pred_valid == (stk.size() > 0), "return prediction valid");
        exp_ev.kind = EV_RET;
        exp_ev.upd_vld = cur_v; exp_ev.upd_key = cur;
        if (stk.size() > 0) begin
          automatic fr_t f = stk.pop_back();
          check(ret_pred_addr == f.ret, "return address");
          exp_ev.pf_vld = f.cv; exp_ev.pf_key = f.caller;
          cur = f.caller; cur_v = f.cv;
        end else begin
          exp_ev.pf_vld = 0;
          cur_v = 0;
          n_under++;
        end
      end else begin
        call_valid = 1;
        call_target = {$urandom_range(65535), 2'b00};
        call_ret_addr = $urandom & ~32'h3;
        exp_ev = '{kind: EV_CALL, pf_vld: 1'b1, pf_key: call_target, upd_vld: cur_v, upd_key: cur};
        if (stk.size() == DEPTH) begin void'(stk.pop_front()); n_over++; end
        stk.push_back('{ret: call_ret_addr, caller: cur, cv: cur_v});
        cur = call_target; cur_v = 1;
      end
      @(negedge clk);
      call_valid = 0; ret_valid = 0;
      check(ev_valid, "event one cycle later");
      check(ev.kind == exp_ev.kind && ev.pf_vld == exp_ev.pf_vld && ev.upd_vld == exp_ev.upd_vld,
            $sformatf("event flags %0d", n));
      check((!exp_ev.pf_vld || ev.pf_key == exp_ev.pf_key) &&
            (!exp_ev.upd_vld || ev.upd_key == exp_ev.upd_key), $sformatf("event keys %0d", n));
      check(cur_func_valid == cur_v && (!cur_v || cur_func == cur), "current function");
      @(negedge clk);
      check(!ev_valid, "one event per call/return");
    end
    check(n_over > 0 && n_under > 0, $sformatf("overflow %0d underflow %0d", n_over, n_under));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
