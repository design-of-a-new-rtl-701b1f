// tb_atm_switch: end-to-end test of the switch at its default size (32
// ports, 8 link groups, two planes, 424-bit cells, 280-cycle slots).
//
// A slot-level model of the whole switch (input queues, the two-phase
// allocation of each plane with rotating scan start, window of two, output
// queues) predicts, slot by slot, which cell leaves on every output. The
// DUT's outputs are compared with it exactly, as are the drop counts. The
// traffic runs through phases that make each mechanism happen: a lone cell
// (two-slot latency), uniform load with round-robin use of each group's
// links, a hot spot on one group (busy groups,
// input and output overflow), one plane out of service and then the other,
// a re-arranged group table, and a final drain after which every cell must
// be accounted for. The self-test flags and controller overruns must stay
// low throughout.
module tb_atm_switch;
  import atm_pkg::*;
  localparam int unsigned N = DEF_N, NG = DEF_NG, NP = DEF_NP, DW = DEF_DW;
  localparam int unsigned IQD = DEF_IQ_DEPTH, OQD = DEF_OQ_DEPTH;
  localparam int unsigned AW = $clog2(N), GW = $clog2(NG), CW = $clog2(N);

  logic clk = 0, rst_n = 0;
  logic [N-1:0] in_valid = '0;
  logic [N-1:0][GW-1:0] in_group = '0;
  logic [N-1:0][DW-1:0] in_data;
  logic [N-1:0] out_valid;
  logic [N-1:0][DW-1:0] out_data;
  logic slot_start;
  logic [NP-1:0] plane_ok = '1;
  logic cfg_we = 0;
  logic [GW-1:0] cfg_group = '0;
  logic [AW-1:0] cfg_base = '0;
  logic [CW-1:0] cfg_size_m1 = '0;
  logic [N-1:0] iq_drop, selftest_err;
  logic [N-1:0][$clog2(NP+1)-1:0] oq_drop;
  logic [NP-1:0] cc_overrun, cc_done;

  atm_switch dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int dut_iq_drops = 0, dut_oq_drops = 0, dut_err = 0, dut_ovr = 0;

  always @(posedge clk) begin
    for (int i = 0; i < N; i++) begin
      dut_iq_drops += int'(iq_drop[i]);
      dut_oq_drops += int'(oq_drop[i]);
      dut_err      += int'(selftest_err[i]);
    end
    for (int p = 0; p < NP; p++) dut_ovr += int'(cc_overrun[p]);
  end

  initial begin
    repeat (2500 * DEF_SLOT_CYCLES) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  function automatic logic [DW-1:0] cell_of(int id);
    logic [DW-1:0] d;
    for (int b = 0; b < DW; b += 32) d[b +: 32] = 32'(id) ^ (32'(b) * 32'h9E3779B1);
    d[31:0] = 32'(id);
    return d;
  endfunction

  // ---- model state ----
  typedef struct { int g; logic [DW-1:0] d; } qe_t;
  qe_t           iq [N][$];
  logic [DW-1:0] oq [N][$];
  int  base [NG], size [NG];
  int  start [NP];
  int  rr [NP][NG];
  bit  en_prev [NP];
  bit  g_grant [NP][N];
  int  g_pos   [NP][N];
  int  g_addr  [NP][N];
  int  m_iq_drops = 0, m_oq_drops = 0;
  int  n_in = 0, n_out = 0;
  // mechanism counters
  int  c_busy = 0, c_test = 0, c_rot = 0, c_win2 = 0, c_single = 0, c_iqdrop = 0;
  int  c_oqdrop = 0, c_two = 0, c_cfg = 0, c_lat = 0;

  // one slot boundary of the model; arrivals and planes for this boundary
  task automatic model_boundary(input bit av [N], input int ag [N], input logic [DW-1:0] ad [N],
                                input logic [NP-1:0] en,
                                output bit ov [N], output logic [DW-1:0] od [N]);
    bit rm [N][2];
    int pos [NP];
    int cnt [NG];
    int per_out [N];
    // output line
    for (int o = 0; o < N; o++) begin
      ov[o] = oq[o].size() > 0;
      od[o] = ov[o] ? oq[o].pop_front() : '0;
      if (ov[o]) n_out++;
    end
    // launch last slot's grants
    for (int o = 0; o < N; o++) per_out[o] = 0;
    for (int i = 0; i < N; i++) begin rm[i][0] = 0; rm[i][1] = 0; end
    for (int p = 0; p < NP; p++)
      for (int i = 0; i < N; i++)
        if (g_grant[p][i]) begin
          int a;
          a = g_addr[p][i];
          per_out[a]++;
          if (oq[a].size() < OQD) oq[a].push_back(iq[i][g_pos[p][i]].d);
          else begin m_oq_drops++; c_oqdrop++; end
          rm[i][g_pos[p][i]] = 1;
        end
    for (int o = 0; o < N; o++) if (per_out[o] == 2) c_two++;
    for (int i = 0; i < N; i++) begin
      if (rm[i][1]) iq[i].delete(1);
      if (rm[i][0]) iq[i].delete(0);
      if (av[i]) begin
        n_in++;
        if (iq[i].size() < IQD) iq[i].push_back('{g: ag[i], d: ad[i]});
        else begin m_iq_drops++; c_iqdrop++; end
      end
    end
    // allocation for the coming slot
    if (en != '1) c_single++;
    for (int p = 0; p < NP; p++) begin
      pos[p] = 0;
      for (int r = 0; r < p; r++) pos[p] += int'(en[r]);
      if (en_prev[p]) begin start[p] = (start[p] + 1) % N; c_rot++; end
      en_prev[p] = en[p];
      for (int g = 0; g < NG; g++) begin
        cnt[g] = 0;
        if (rr[p][g] < base[g] || rr[p][g] >= base[g] + size[g]) rr[p][g] = base[g];
      end
      for (int j = 0; j < N; j++) begin
        int i, g;
        i = (start[p] + j) % N;
        g_grant[p][i] = 0;
        if (en[p] && pos[p] < 2 && iq[i].size() > pos[p]) begin
          g = iq[i][pos[p]].g;
          if (cnt[g] < size[g]) begin
            g_grant[p][i] = 1; g_pos[p][i] = pos[p]; g_addr[p][i] = rr[p][g];
            rr[p][g] = (rr[p][g] == base[g] + size[g] - 1) ? base[g] : rr[p][g] + 1;
            cnt[g]++;
            if (pos[p] == 1) c_win2++;
          end else c_busy++;
        end
      end
      if (en[p]) for (int g = 0; g < NG; g++) c_test += size[g] - cnt[g];
    end
  endtask

  int slot = 0, next_id = 1;

  // drive one slot boundary: arrivals with probability load/100, groups
  // uniform or forced to `hot` (>= 0)
  task automatic do_slot(int load, int hot, logic [NP-1:0] en);
    bit av [N]; int ag [N]; logic [DW-1:0] ad [N];
    bit ov [N]; logic [DW-1:0] od [N];
    do @(negedge clk); while (!slot_start);
    for (int i = 0; i < N; i++) begin
      av[i] = ($urandom % 100) < load;
      ag[i] = hot >= 0 ? hot : int'($urandom % NG);
      ad[i] = cell_of(next_id);
      if (av[i]) next_id++;
      in_valid[i] = av[i];
      in_group[i] = GW'(ag[i]);
      in_data[i]  = ad[i];
    end
    plane_ok = en;
    model_boundary(av, ag, ad, en, ov, od);
    @(negedge clk);
    in_valid = '0;
    for (int o = 0; o < N; o++) begin
      check(out_valid[o] == ov[o], $sformatf("slot %0d out %0d valid %0b expected %0b", slot, o, out_valid[o], ov[o]));
      if (ov[o]) check(out_data[o] == od[o], $sformatf("slot %0d out %0d cell %0d expected %0d", slot, o, out_data[o][31:0], od[o][31:0]));
    end
    slot++;
  endtask

  task automatic configure(int sizes [NG]);
    int b;
    // wait until both controllers have finished this slot
    do @(negedge clk); while (!(cc_done == plane_ok));
    b = 0;
    for (int g = 0; g < NG; g++) begin
      cfg_we = 1; cfg_group = GW'(g); cfg_base = AW'(b); cfg_size_m1 = CW'(sizes[g] - 1);
      base[g] = b; size[g] = sizes[g]; b += sizes[g];
      @(negedge clk);
    end
    cfg_we = 0;
    c_cfg++;
  endtask

  initial begin
    int sizes [NG];
    for (int i = 0; i < N; i++) in_data[i] = '0;
    for (int g = 0; g < NG; g++) begin base[g] = g * (N / NG); size[g] = N / NG; end
    for (int p = 0; p < NP; p++) begin
      start[p] = 0; en_prev[p] = 0;
      for (int g = 0; g < NG; g++) rr[p][g] = 0;
      for (int i = 0; i < N; i++) begin g_grant[p][i] = 0; g_pos[p][i] = 0; g_addr[p][i] = 0; end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;

    // a lone cell: enters at slot 1, must leave two slots later
    do_slot(0, -1, '1);
    begin
      int t0;
      do @(negedge clk); while (!slot_start);
      in_valid[5] = 1; in_group[5] = GW'(6); in_data[5] = cell_of(999999);
      begin
        bit av [N]; int ag [N]; logic [DW-1:0] ad [N]; bit ov [N]; logic [DW-1:0] od [N];
        for (int i = 0; i < N; i++) begin av[i] = (i == 5); ag[i] = 6; ad[i] = cell_of(999999); end
        model_boundary(av, ag, ad, '1, ov, od);
      end
      t0 = slot; slot++;
      @(negedge clk); in_valid = '0;
      do_slot(0, -1, '1);
      check(out_valid == '0, "lone cell not out after one slot");
      do_slot(0, -1, '1);
      check(out_valid[6 * (N / NG)] && out_data[6 * (N / NG)] == cell_of(999999) && slot - t0 == 3,
            "lone cell out on first port of group 6 two slots after arrival");
      if (out_valid[6 * (N / NG)]) c_lat++;
    end

    repeat (150) do_slot(50, -1, '1);        // uniform load
    repeat (40)  do_slot(60, 2, '1);         // hot spot on group 2
    repeat (30)  do_slot(0, -1, '1);         // drain
    repeat (100) do_slot(45, -1, 2'b01);     // plane 1 out of service
    repeat (60)  do_slot(45, -1, 2'b10);     // plane 0 out of service
    sizes = '{12, 8, 4, 2, 2, 2, 1, 1};
    configure(sizes);
    repeat (150) do_slot(70, -1, '1);        // unequal groups, higher load
    sizes = '{4, 4, 4, 4, 4, 4, 4, 4};
    configure(sizes);
    repeat (60)  do_slot(90, -1, '1);
    repeat (40)  do_slot(0, -1, '1);         // drain

    // accounting
    check(dut_iq_drops == m_iq_drops, $sformatf("input drops %0d expected %0d", dut_iq_drops, m_iq_drops));
    check(dut_oq_drops == m_oq_drops, $sformatf("output drops %0d expected %0d", dut_oq_drops, m_oq_drops));
    check(n_in == n_out + m_iq_drops + m_oq_drops, "every cell delivered or counted as lost");
    check(dut_err == 0, "self test quiet");
    check(dut_ovr == 0, "controllers finish within the slot");

    // every mechanism must have happened
    check(c_lat > 0,    "lone-cell latency seen");
    check(c_busy > 0,   "busy group refusals");
    check(c_test > 0,   "test packets");
    check(c_rot > 0,    "rotating scan start");
    check(c_win2 > 0,   "second-cell grants (window of two)");
    check(c_single > 0, "single-plane operation");
    check(c_iqdrop > 0, "input queue overflow");
    check(c_oqdrop > 0, "output queue overflow");
    check(c_two > 0,    "two cells to one output in a slot");
    check(c_cfg == 2,   "group table re-arranged");
    $display("cells in=%0d out=%0d iq_drop=%0d oq_drop=%0d", n_in, n_out, m_iq_drops, m_oq_drops);
    $display("busy=%0d test=%0d rot=%0d win2=%0d single=%0d iqdrop=%0d oqdrop=%0d two=%0d cfg=%0d",
             c_busy, c_test, c_rot, c_win2, c_single, c_iqdrop, c_oqdrop, c_two, c_cfg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
