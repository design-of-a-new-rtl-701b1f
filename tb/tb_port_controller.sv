// tb_port_controller: one port controller between two behavioural central
// controllers. Each slot: a random arrival, random planes in service, a
// phase I scan in which this port's request is checked and randomly granted
// or refused, and a phase II poll. The packets launched at the next slot
// boundary, the queue removals and the bus behaviour of unselected ports are
// checked against a model.
module tb_port_controller;
  localparam int unsigned N = 8, NG = 4, NP = 2, DW = 16, IQ_DEPTH = 4, PORT_ID = 3;
  localparam int unsigned AW = $clog2(N), GW = $clog2(NG), PW = 1 + AW + 1 + DW;

  logic clk = 0, rst_n = 0, slot_start = 0;
  logic in_valid = 0;
  logic [GW-1:0] in_group = '0;
  logic [DW-1:0] in_data = '0;
  logic [NP-1:0] plane_en = '0, str = '0, req, bf = '0, poll_in = '0, poll_out;
  logic [NP-1:0][AW-1:0] ka = '0, ca = '0, poll_ca = '0;
  logic [NP-1:0][GW-1:0] iga;
  logic [NP-1:0][PW-1:0] pkt_out;
  logic [$clog2(IQ_DEPTH+1)-1:0] q_count;
  logic iq_drop;

  port_controller #(.N(N), .NG(NG), .NP(NP), .DW(DW), .IQ_DEPTH(IQ_DEPTH), .PORT_ID(PORT_ID)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_win2 = 0, n_test = 0, n_refused = 0, n_single = 0, n_drop = 0;

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

  logic [GW+DW-1:0] q[$];
  // model of what was decided in the previous slot
  bit            m_grant [NP], m_test [NP];
  int            m_pos [NP];
  logic [AW-1:0] m_addr [NP];

  initial begin
    for (int p = 0; p < NP; p++) begin m_grant[p] = 0; m_test[p] = 0; m_pos[p] = 0; m_addr[p] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 2000; s++) begin
      logic [NP-1:0][PW-1:0] exp_pkt;
      bit exp_drop, rm[2];
      int pos [NP];
      logic [GW+DW-1:0] newc;
      // slot boundary
      @(negedge clk);
      slot_start = 1;
      in_valid = ($urandom % 3) != 0;
      in_group = GW'($urandom);
      in_data  = DW'($urandom);
      plane_en = NP'($urandom_range(1, 3));
      rm[0] = 0; rm[1] = 0;
      for (int p = 0; p < NP; p++) begin
        if (m_grant[p]) begin
          exp_pkt[p] = {1'b1, m_addr[p], 1'b1, q[m_pos[p]][DW-1:0]};
          rm[m_pos[p]] = 1;
        end else if (m_test[p]) exp_pkt[p] = {1'b1, m_addr[p], 1'b0, DW'(PORT_ID)};
        else exp_pkt[p] = '0;
      end
      if (rm[1]) q.delete(1);
      if (rm[0]) q.delete(0);
      exp_drop = 0;
      if (in_valid) begin
        newc = {in_group, in_data};
        if (q.size() < IQ_DEPTH) q.push_back(newc); else exp_drop = 1;
      end
      @(negedge clk);
      slot_start = 0; in_valid = 0;
      for (int p = 0; p < NP; p++) check(pkt_out[p] == exp_pkt[p], $sformatf("slot %0d packet plane %0d", s, p));
      check(iq_drop == exp_drop, "drop");
      if (exp_drop) n_drop++;
      check(int'(q_count) == q.size(), "queue count");
      // window positions for this slot
      for (int p = 0; p < NP; p++) begin
        pos[p] = 0;
        for (int r = 0; r < p; r++) pos[p] += int'(plane_en[r]);
        m_grant[p] = 0; m_test[p] = 0;
      end
      if (plane_en != 2'b11) n_single++;
      // phase I: both planes scan all ports
      for (int k = 0; k < N; k++) begin
        bit offer [NP];
        str = '1;
        for (int p = 0; p < NP; p++) begin
          ka[p] = AW'((k + p) % N);
          bf[p] = ($urandom % 3) == 0;
          ca[p] = AW'($urandom);
        end
        #1;
        for (int p = 0; p < NP; p++) begin
          offer[p] = plane_en[p] && q.size() > pos[p];
          if (int'(ka[p]) == PORT_ID) begin
            check(req[p] == offer[p], $sformatf("req plane %0d", p));
            if (offer[p]) check(iga[p] == q[pos[p]][GW+DW-1 -: GW], "iga");
            if (offer[p] && !bf[p]) begin
              m_grant[p] = 1; m_pos[p] = pos[p]; m_addr[p] = ca[p];
              if (pos[p] == 1) n_win2++;
            end
            if (offer[p] && bf[p]) n_refused++;
          end else begin
            check(req[p] == 0 && iga[p] == '0, "quiet when not selected");
          end
        end
        @(negedge clk);
      end
      str = '0;
      // phase II: a few polls per plane
      for (int k = 0; k < 3; k++) begin
        for (int p = 0; p < NP; p++) begin
          poll_in[p] = $urandom % 2;
          poll_ca[p] = AW'($urandom);
        end
        #1;
        for (int p = 0; p < NP; p++) begin
          bit takes;
          takes = poll_in[p] && plane_en[p] && !m_grant[p] && !m_test[p];
          check(poll_out[p] == (poll_in[p] && !takes), "poll_out");
          if (takes) begin m_test[p] = 1; m_addr[p] = poll_ca[p]; n_test++; end
        end
        @(negedge clk);
      end
      poll_in = '0;
    end
    check(n_win2 > 0 && n_test > 0 && n_refused > 0 && n_single > 0 && n_drop > 0, "coverage");
    $display("window2=%0d tests=%0d refused=%0d single_plane=%0d drops=%0d", n_win2, n_test, n_refused, n_single, n_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
