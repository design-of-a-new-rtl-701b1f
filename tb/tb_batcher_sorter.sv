// tb_batcher_sorter: random packet sets through the sorter. With every
// address present once (the normal case) output i must carry address i and
// its own payload; with some inputs empty, the present packets must come
// first in ascending address order. Checks the one-cycle register latency.
module tb_batcher_sorter;
  localparam int unsigned N = 16, DW = 8, AW = $clog2(N), PW = 1 + AW + 1 + DW;

  logic clk = 0, rst_n = 0;
  logic in_strobe = 0, out_strobe;
  logic [N-1:0][PW-1:0] in_pkt, out_pkt;
  int checks = 0, failures = 0, n_full = 0, n_sparse = 0;

  batcher_sorter #(.N(N), .DW(DW)) dut (.*);

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
    in_pkt = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      int perm [N];
      bit sparse;
      int npres, last;
      logic [DW-1:0] pay_of [N];
      sparse = (t % 3) == 2;
      for (int i = 0; i < N; i++) perm[i] = i;
      perm.shuffle();
      npres = 0;
      for (int i = 0; i < N; i++) begin
        logic pres;
        logic [DW-1:0] pay;
        pres = !sparse || ($urandom % 3 != 0);
        pay  = DW'($urandom);
        pay_of[perm[i]] = pay;
        if (pres) npres++;
        in_pkt[i] = pres ? {1'b1, AW'(perm[i]), 1'($urandom), pay} : {1'b0, AW'($urandom), 1'b0, DW'($urandom)};
      end
      @(negedge clk); in_strobe = 1;
      @(negedge clk); in_strobe = 0;
      check(out_strobe == 1'b1, "strobe one cycle later");
      @(negedge clk);
      check(out_strobe == 1'b0, "strobe is a pulse");
      if (!sparse) begin
        n_full++;
        for (int i = 0; i < N; i++) begin
          check(out_pkt[i][PW-1] && out_pkt[i][PW-2 -: AW] == AW'(i) && out_pkt[i][DW-1:0] == pay_of[i],
                $sformatf("full set out %0d", i));
        end
      end else begin
        n_sparse++;
        last = -1;
        for (int i = 0; i < N; i++) begin
          if (i < npres) begin
            int a;
            a = int'(out_pkt[i][PW-2 -: AW]);
            check(out_pkt[i][PW-1] && a > last && out_pkt[i][DW-1:0] == pay_of[a], $sformatf("sparse out %0d", i));
            last = a;
          end else begin
            check(!out_pkt[i][PW-1], $sformatf("empty at end %0d", i));
          end
        end
      end
    end
    check(n_full > 0 && n_sparse > 0, "coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
