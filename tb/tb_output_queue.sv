// tb_output_queue: one output port receiving a random mix of cells, test
// packets, wrongly addressed and missing packets from two planes. Checks the
// cell order on the line (plane 0 before plane 1 within a slot), one cell
// per slot, overflow drops, and the self-test flag.
module tb_output_queue;
  localparam int unsigned N = 8, NP = 2, DW = 16, DEPTH = 4, PORT_ID = 5;
  localparam int unsigned AW = $clog2(N), PW = 1 + AW + 1 + DW;

  logic clk = 0, rst_n = 0;
  logic slot_start = 0, in_strobe = 0;
  logic [NP-1:0][PW-1:0] in_pkt;
  logic [NP-1:0] plane_act;
  logic out_valid, selftest_err;
  logic [DW-1:0] out_data;
  logic [$clog2(DEPTH+1)-1:0] count;
  logic [$clog2(NP+1)-1:0] drop;
  int checks = 0, failures = 0;
  int n_two = 0, n_drop = 0, n_err = 0, n_test = 0, n_out = 0;
  logic [DW-1:0] model[$];

  output_queue #(.N(N), .NP(NP), .DW(DW), .DEPTH(DEPTH), .PORT_ID(PORT_ID)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    in_pkt = '0; plane_act = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 3000; s++) begin
      bit exp_v, exp_err;
      logic [DW-1:0] exp_d;
      int exp_drop, ncell;
      // slot boundary: one cell leaves
      @(negedge clk); slot_start = 1;
      exp_v = model.size() > 0;
      exp_d = exp_v ? model.pop_front() : '0;
      @(negedge clk); slot_start = 0;
      check(out_valid == exp_v, "out_valid");
      if (exp_v) begin check(out_data == exp_d, "out_data order"); n_out++; end
      // packets from the sorters
      plane_act = 2'($urandom_range(1, 3));
      exp_err = 0; exp_drop = 0; ncell = 0;
      for (int p = 0; p < NP; p++) begin
        int kind;
        logic [DW-1:0] d;
        kind = $urandom % 20;
        d = DW'($urandom);
        if (kind < 12) begin                      // user cell for this port
          in_pkt[p] = {1'b1, AW'(PORT_ID), 1'b1, d};
          ncell++;
          if (model.size() < DEPTH) model.push_back(d); else exp_drop++;
        end else if (kind < 18) begin             // test packet
          in_pkt[p] = {1'b1, AW'(PORT_ID), 1'b0, d};
          n_test++;
        end else if (kind < 19) begin             // misrouted
          in_pkt[p] = {1'b1, AW'(PORT_ID + 1), 1'($urandom), d};
          if (plane_act[p]) exp_err = 1;
        end else begin                            // missing
          in_pkt[p] = '0;
          if (plane_act[p]) exp_err = 1;
        end
      end
      if (ncell == 2) n_two++;
      @(negedge clk); in_strobe = 1;
      @(negedge clk); in_strobe = 0;
      check(int'(drop) == exp_drop, "drop count");
      check(selftest_err == exp_err, "selftest flag");
      check(int'(count) == model.size(), "count");
      if (exp_drop > 0) n_drop++;
      if (exp_err) n_err++;
      @(negedge clk);
      check(!selftest_err && drop == 0, "flags are pulses");
    end
    check(n_two > 0 && n_drop > 0 && n_err > 0 && n_test > 0 && n_out > 0, "coverage");
    $display("two=%0d drops=%0d errs=%0d tests=%0d out=%0d", n_two, n_drop, n_err, n_test, n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
