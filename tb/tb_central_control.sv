// tb_central_control: one controller with behavioural port controllers on
// its bus and POLL chain. Each slot the ports request random groups; the
// resulting output address of every port (phase I grant or phase II test
// address) is compared with an independent model of the allocation, as is
// the number of cycles the controller takes. Covers rotating priority,
// round-robin hand-out of each group's links (with wrap-around),
// busy groups, re-configured groups of unequal size and a disabled plane.
module tb_central_control;
  localparam int unsigned N  = 16;
  localparam int unsigned NG = 4;
  localparam int unsigned GMAX = 16;
  localparam int unsigned AW = $clog2(N), GW = $clog2(NG), CW = $clog2(GMAX);

  logic clk = 0, rst_n = 0;
  logic slot_start = 0, enable = 1;
  logic cfg_we = 0;
  logic [GW-1:0] cfg_group = '0;
  logic [AW-1:0] cfg_base = '0;
  logic [CW-1:0] cfg_size_m1 = '0;
  logic str, req, bf, poll, chain_end, done, overrun;
  logic [AW-1:0] ka, ca, poll_ca;
  logic [GW-1:0] iga;
  atm_pkg::cc_phase_e phase;

  central_control #(.N(N), .NG(NG), .GMAX(GMAX)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_wrap = 0, n_busy = 0, n_test = 0, n_rot = 0, n_cfg = 0, n_idle = 0;

  // behavioural port controllers
  logic          req_v [N];
  logic [GW-1:0] req_g [N];
  logic          granted [N], tested [N];
  logic [AW-1:0] got [N];
  int            take;

  always_comb begin
    req = str && req_v[ka];
    iga = (str && req_v[ka]) ? req_g[ka] : '0;
    take = -1;
    for (int i = N - 1; i >= 0; i--) if (!granted[i] && !tested[i]) take = i;
    chain_end = poll && (take < 0);
  end

  always_ff @(posedge clk) begin
    if (slot_start) begin
      for (int i = 0; i < N; i++) begin granted[i] <= 0; tested[i] <= 0; end
    end else begin
      if (str && req && !bf) begin granted[ka] <= 1; got[ka] <= ca; end
      if (poll && !chain_end) begin tested[take] <= 1; got[take] <= poll_ca; end
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  int base [NG], size [NG], rr [NG];

  initial begin
    int start, prev_en;
    for (int g = 0; g < NG; g++) begin base[g] = g * (N / NG); size[g] = N / NG; rr[g] = 0; end
    for (int i = 0; i < N; i++) begin req_v[i] = 0; req_g[i] = 0; granted[i] = 0; tested[i] = 0; got[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    start = 0; prev_en = 0;
    for (int s = 0; s < 300; s++) begin
      int cnt [NG], nxt [NG];
      int exp_addr [N];
      int exp_g [N];
      int k, cycles, exp_cycles, ngfull;
      bit en;
      // occasionally re-arrange the groups (takes effect at the next slot)
      if (s == 100 || s == 200) begin
        int nb [NG];
        if (s == 100) begin nb[0] = 8; nb[1] = 4; nb[2] = 2; nb[3] = 2; end
        else          begin nb[0] = 1; nb[1] = 1; nb[2] = 13; nb[3] = 1; end
        k = 0;
        for (int g = 0; g < NG; g++) begin
          @(negedge clk);
          cfg_we = 1; cfg_group = GW'(g); cfg_base = AW'(k); cfg_size_m1 = CW'(nb[g] - 1);
          base[g] = k; size[g] = nb[g]; k += nb[g];
        end
        @(negedge clk); cfg_we = 0;
        n_cfg++;
      end
      en = !(s % 37 == 5);
      // this slot's requests; skew towards group 0 to make it busy
      for (int i = 0; i < N; i++) begin
        req_v[i] = ($urandom % 4) != 0;
        req_g[i] = ($urandom % 2) ? GW'(0) : GW'($urandom);
      end
      @(negedge clk);
      enable = en;
      slot_start = 1;
      if (prev_en) start = (start + 1) % N;
      if (prev_en && s > 0) n_rot++;
      @(negedge clk);
      slot_start = 0;
      // model of both phases; each group hands out its outputs round robin,
      // starting where phase I stopped in the last slot
      for (int g = 0; g < NG; g++) begin
        cnt[g] = 0;
        if (rr[g] < base[g] || rr[g] >= base[g] + size[g]) rr[g] = base[g];
        nxt[g] = rr[g];
      end
      for (int i = 0; i < N; i++) exp_addr[i] = -1;
      for (int j = 0; j < N; j++) begin
        int i, g; i = (start + j) % N; g = req_g[i];
        if (req_v[i]) begin
          if (cnt[g] < size[g]) begin
            exp_addr[i] = nxt[g]; cnt[g]++;
            nxt[g] = (nxt[g] == base[g] + size[g] - 1) ? base[g] : nxt[g] + 1;
            if (nxt[g] == base[g]) n_wrap++;
          end else n_busy++;
        end
      end
      if (en) for (int g = 0; g < NG; g++) rr[g] = nxt[g];
      ngfull = 0;
      for (int g = 0; g < NG; g++) if (cnt[g] == size[g]) ngfull++;
      k = 0;
      exp_cycles = NG + N + 1 + ngfull;
      for (int g = 0; g < NG; g++) begin
        while (cnt[g] < size[g]) begin
          while (k < N && exp_addr[k] != -1) k++;
          exp_addr[k] = -2 - nxt[g];   // test address, marked
          nxt[g] = (nxt[g] == base[g] + size[g] - 1) ? base[g] : nxt[g] + 1;
          cnt[g]++; exp_cycles++; n_test++;
        end
      end
      // wait for done, counting cycles from the slot_start edge
      cycles = 0;
      while (!done && cycles < 200) begin
        @(negedge clk);
        cycles++;
        if (!en) break;
      end
      if (!en) begin
        n_idle++;
        check(!done && !str && !poll, "idle plane stays quiet");
        for (int i = 0; i < N; i++) check(!granted[i] && !tested[i], "no grants when disabled");
      end else begin
        check(cycles == exp_cycles, $sformatf("cycles %0d expected %0d", cycles, exp_cycles));
        for (int i = 0; i < N; i++) begin
          if (exp_addr[i] >= 0)
            check(granted[i] && !tested[i] && int'(got[i]) == exp_addr[i],
                  $sformatf("slot %0d port %0d grant %0d expected %0d", s, i, got[i], exp_addr[i]));
          else
            check(tested[i] && !granted[i] && int'(got[i]) == -2 - exp_addr[i],
                  $sformatf("slot %0d port %0d test %0d expected %0d", s, i, got[i], -2 - exp_addr[i]));
        end
      end
      prev_en = en;
      repeat (3) @(negedge clk);
      check(!overrun, "no overrun");
    end
    check(n_busy > 0 && n_test > 0 && n_rot > 0 && n_cfg == 2 && n_idle > 0 && n_wrap > 0, "coverage");
    $display("busy=%0d test=%0d rotations=%0d reconfig=%0d idle_slots=%0d", n_busy, n_test, n_rot, n_cfg, n_idle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
