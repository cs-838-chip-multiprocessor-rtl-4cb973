// prefetch_stats: event counters for the prefetch accuracy and coverage metrics.
//
// The L2 controller pulses one flag per <state>action transition of the prefetch state
// diagram. This block keeps a saturating CNT_W-bit count of each, from which
//   accuracy = (<ISP>GETS + <SP>GETS) / <NP>Prefetch
//   coverage = (<ISP>GETS + <SP>GETS) / (<ISP>GETS + <SP>GETS + <NP>GETS)
// are formed by whoever reads the counters (the divisions are left to software). It also
// counts dropped prefetches, unused prefetched lines that were evicted, demand stalls and
// write-backs. The counters update on the clock edge after the pulse and clear on clear
// or reset. The metric definitions follow the source report; the counter width and the extra
// counters are this design's choice.
module prefetch_stats
  import cmp_pf_pkg::*;
#(
  parameter int unsigned CNT_W = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  l2_events_t       ev,
  output logic [CNT_W-1:0] n_np_gets,
  output logic [CNT_W-1:0] n_isp_gets,
  output logic [CNT_W-1:0] n_sp_gets,
  output logic [CNT_W-1:0] n_np_prefetch,
  output logic [CNT_W-1:0] n_pf_data_ack,
  output logic [CNT_W-1:0] n_sp_replace,
  output logic [CNT_W-1:0] n_pf_drop_tbe,
  output logic [CNT_W-1:0] n_pf_drop_hit,
  output logic [CNT_W-1:0] n_demand_stall,
  output logic [CNT_W-1:0] n_writeback
);
  function automatic logic [CNT_W-1:0] inc(logic [CNT_W-1:0] c, logic en);
    return (en && (c != '1)) ? c + 1'b1 : c;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_np_gets <= '0; n_isp_gets <= '0; n_sp_gets <= '0; n_np_prefetch <= '0;
      n_pf_data_ack <= '0; n_sp_replace <= '0; n_pf_drop_tbe <= '0; n_pf_drop_hit <= '0;
      n_demand_stall <= '0; n_writeback <= '0;
    end else if (clear) begin
      n_np_gets <= '0; n_isp_gets <= '0; n_sp_gets <= '0; n_np_prefetch <= '0;
      n_pf_data_ack <= '0; n_sp_replace <= '0; n_pf_drop_tbe <= '0; n_pf_drop_hit <= '0;
      n_demand_stall <= '0; n_writeback <= '0;
    end else begin
      n_np_gets      <= inc(n_np_gets,      ev.np_gets);
      n_isp_gets     <= inc(n_isp_gets,     ev.isp_gets);
      n_sp_gets      <= inc(n_sp_gets,      ev.sp_gets);
      n_np_prefetch  <= inc(n_np_prefetch,  ev.np_prefetch);
      n_pf_data_ack  <= inc(n_pf_data_ack,  ev.pf_data_ack);
      n_sp_replace   <= inc(n_sp_replace,   ev.sp_replace);
      n_pf_drop_tbe  <= inc(n_pf_drop_tbe,  ev.pf_drop_tbe);
      n_pf_drop_hit  <= inc(n_pf_drop_hit,  ev.pf_drop_hit);
      n_demand_stall <= inc(n_demand_stall, ev.demand_stall);
      n_writeback    <= inc(n_writeback,    ev.writeback);
    end
  end
endmodule
