// tb_vc_xbar: random port signals, initiator and target sets; checks that
// every target receives the initiator's signals, that the initiator receives
// the AND of srdy/init_b/done and the OR of ad_s/ack of its targets, and that
// all other ports see the idle bus.
module tb_vc_xbar;
  import vc_pkg::*;
  localparam int NP = 5;
  int checks = 0, failures = 0;
  vc_sig_t in [NP], out [NP];
  logic active;
  logic [2:0] init;
  logic [NP-1:0] dmask;
  vc_xbar #(.NP(NP)) dut (.*);
  function automatic vc_sig_t rnd_sig();
    vc_sig_t s;
    s = {$urandom, $urandom, $urandom};
    s.ad_s = $urandom_range(3, 0) == 0 ? $urandom : 0;
    return s;
  endfunction
  initial begin
    for (int t = 0; t < 2000; t++) begin
      vc_sig_t e [NP];
      logic s_and, i_and, d_and, a_or;
      logic [31:0] ad_or;
      for (int p = 0; p < NP; p++) in[p] = rnd_sig();
      active = $urandom_range(7, 0) != 0;
      init = 3'($urandom_range(NP - 1, 0));
      dmask = NP'($urandom) & ~(NP'(1) << init);
      #1;
      s_and = 1; i_and = 1; d_and = 1; a_or = 0; ad_or = 0;
      for (int p = 0; p < NP; p++) begin
        e[p] = VC_IDLE;
        if (active && dmask[p]) begin
          e[p].busmode = in[init].busmode; e[p].req = in[init].req; e[p].sel = in[init].sel;
          e[p].frame = in[init].frame; e[p].mrdy = in[init].mrdy; e[p].ad_m = in[init].ad_m;
          e[p].cclk = in[init].cclk; e[p].prog_b = in[init].prog_b; e[p].cs_b = in[init].cs_b;
          e[p].rdwr_b = in[init].rdwr_b;
          s_and &= in[p].srdy; i_and &= in[p].init_b; d_and &= in[p].done;
          a_or |= in[p].ack; ad_or |= in[p].ad_s;
        end
      end
      if (active && dmask != 0) begin
        e[init].srdy = s_and; e[init].init_b = i_and; e[init].done = d_and;
        e[init].ack = a_or; e[init].ad_s = ad_or;
      end
      for (int p = 0; p < NP; p++) begin
        checks++;
        if (out[p] !== e[p]) begin failures++; if (failures < 5) $display("port %0d: %h expected %h", p, out[p], e[p]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
