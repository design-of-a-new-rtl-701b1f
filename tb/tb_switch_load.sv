// tb_switch_load: the evaluated traffic on two 32-port switches with 8 link
// groups of 4 outputs: uniform destinations, Bernoulli arrivals with
// probability lambda per input per slot.
//   dup    : two planes, input queue 3, output queue 17, lambda = 0.9
//            (about 1e-6 cell loss is expected for these sizes);
//   single : one plane, input queue 15, lambda = 0.7 (the single-plane
//            case, also about 1e-6).
// Each delivered cell is checked to be one that was sent, delivered once,
// on an output of its own group, no earlier than two slots after arrival.
// After a drain every cell must be delivered or counted as lost, and the
// loss ratio must stay below 1e-3 (the run is far too short to resolve
// 1e-6). Carried load and mean delay are printed. Slots are shortened to
// 80 cycles, which still leaves the allocation room to finish (at most 77).
module tb_switch_load;
  localparam int unsigned N = 32, NG = 8, DW = 64, SLOTS = 4000, SC = 80;
  localparam int unsigned AW = $clog2(N), GW = $clog2(NG), CW = $clog2(N);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat ((SLOTS + 200) * SC) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- duplicated switch ----------------
  logic [N-1:0] d_in_valid = '0, d_out_valid, d_iq_drop, d_err;
  logic [N-1:0][GW-1:0] d_in_group = '0;
  logic [N-1:0][DW-1:0] d_in_data = '0, d_out_data;
  logic [N-1:0][1:0] d_oq_drop;
  logic [1:0] d_ovr, d_done;
  logic d_slot;

  atm_switch #(.N(N), .NG(NG), .NP(2), .DW(DW), .IQ_DEPTH(3), .OQ_DEPTH(17), .SLOT_CYCLES(SC)) dup (
    .clk, .rst_n, .in_valid(d_in_valid), .in_group(d_in_group), .in_data(d_in_data),
    .out_valid(d_out_valid), .out_data(d_out_data), .slot_start(d_slot), .plane_ok(2'b11),
    .cfg_we(1'b0), .cfg_group('0), .cfg_base('0), .cfg_size_m1('0),
    .iq_drop(d_iq_drop), .oq_drop(d_oq_drop), .selftest_err(d_err), .cc_overrun(d_ovr), .cc_done(d_done));

  // ---------------- single-plane switch ----------------
  logic [N-1:0] s_in_valid = '0, s_out_valid, s_iq_drop, s_err;
  logic [N-1:0][GW-1:0] s_in_group = '0;
  logic [N-1:0][DW-1:0] s_in_data = '0, s_out_data;
  logic [N-1:0][0:0] s_oq_drop;
  logic [0:0] s_ovr, s_done;
  logic s_slot;

  atm_switch #(.N(N), .NG(NG), .NP(1), .DW(DW), .IQ_DEPTH(15), .OQ_DEPTH(17), .SLOT_CYCLES(SC)) single (
    .clk, .rst_n, .in_valid(s_in_valid), .in_group(s_in_group), .in_data(s_in_data),
    .out_valid(s_out_valid), .out_data(s_out_data), .slot_start(s_slot), .plane_ok(1'b1),
    .cfg_we(1'b0), .cfg_group('0), .cfg_base('0), .cfg_size_m1('0),
    .iq_drop(s_iq_drop), .oq_drop(s_oq_drop), .selftest_err(s_err), .cc_overrun(s_ovr), .cc_done(s_done));

  // drop, alarm and overrun tallies per switch: index 0 dup, 1 single
  int drops [2] = '{0, 0}, alarms [2] = '{0, 0};
  always @(posedge clk) begin
    for (int i = 0; i < N; i++) begin
      drops[0] += int'(d_iq_drop[i]) + int'(d_oq_drop[i]);
      drops[1] += int'(s_iq_drop[i]) + int'(s_oq_drop[i]);
      alarms[0] += int'(d_err[i]);
      alarms[1] += int'(s_err[i]);
    end
    alarms[0] += int'(d_ovr[0]) + int'(d_ovr[1]);
    alarms[1] += int'(s_ovr[0]);
  end

  // cell bookkeeping, per switch
  int grp_of [2][int];
  int t_in   [2][int];
  int n_sent [2] = '{0, 0}, n_recv [2] = '{0, 0};
  longint delay_sum [2] = '{0, 0};

  task automatic deliver(int sw, int slot, int o, logic [DW-1:0] d);
    int id;
    id = int'(d[31:0]);
    check(grp_of[sw].exists(id), $sformatf("switch %0d: unknown cell %0d", sw, id));
    if (grp_of[sw].exists(id)) begin
      check(o / (N / NG) == grp_of[sw][id], $sformatf("switch %0d: cell %0d on output %0d outside group %0d", sw, id, o, grp_of[sw][id]));
      check(slot - t_in[sw][id] >= 2, "latency at least two slots");
      check(d[63:32] == ~d[31:0], "payload intact");
      delay_sum[sw] += slot - t_in[sw][id];
      grp_of[sw].delete(id);
      n_recv[sw]++;
    end
  endtask

  task automatic run(int sw, int lambda_pct, ref logic [N-1:0] iv, ref logic [N-1:0][GW-1:0] ig,
                     ref logic [N-1:0][DW-1:0] id_, ref logic slot_s,
                     ref logic [N-1:0] ov, ref logic [N-1:0][DW-1:0] od);
    int next_id;
    next_id = 1;
    for (int s = 0; s < SLOTS + 100; s++) begin
      do @(negedge clk); while (!slot_s);
      for (int i = 0; i < N; i++) begin
        iv[i] = (s < SLOTS) && (($urandom % 1000) < lambda_pct * 10);
        ig[i] = GW'($urandom % NG);
        id_[i] = {~32'(next_id), 32'(next_id)};
        if (iv[i]) begin
          grp_of[sw][next_id] = int'(ig[i]);
          t_in[sw][next_id] = s;
          n_sent[sw]++;
          next_id++;
        end
      end
      @(negedge clk);
      iv = '0;
      for (int o = 0; o < N; o++) if (ov[o]) deliver(sw, s, o, od[o]);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      run(0, 90, d_in_valid, d_in_group, d_in_data, d_slot, d_out_valid, d_out_data);
      run(1, 70, s_in_valid, s_in_group, s_in_data, s_slot, s_out_valid, s_out_data);
    join
    for (int sw = 0; sw < 2; sw++) begin
      real loss, carried;
      check(n_sent[sw] == n_recv[sw] + drops[sw], $sformatf("switch %0d: sent %0d = delivered %0d + lost %0d", sw, n_sent[sw], n_recv[sw], drops[sw]));
      check(alarms[sw] == 0, "no self-test alarm or overrun");
      loss = real'(drops[sw]) / real'(n_sent[sw]);
      carried = real'(n_recv[sw]) / real'(SLOTS * N);
      check(loss < 1.0e-3, $sformatf("switch %0d loss ratio %g", sw, loss));
      $display("%s: lambda=%0.2f sent=%0d delivered=%0d lost=%0d loss=%g carried=%0.3f mean_delay=%0.2f slots",
               sw == 0 ? "duplicated (IQ 3, OQ 17)" : "single plane (IQ 15)", sw == 0 ? 0.9 : 0.7,
               n_sent[sw], n_recv[sw], drops[sw], loss, carried, real'(delay_sum[sw]) / real'(n_recv[sw]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
