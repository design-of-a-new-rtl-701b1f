// tb_input_queue: random removals of the head and/or second entry and
// arrivals, checked against a queue model, including overflow drops.
module tb_input_queue;
  localparam int unsigned DEPTH = 5;
  localparam int unsigned W     = 12;

  logic clk = 0, rst_n = 0;
  logic update, rm0, rm1, push;
  logic [W-1:0] push_data, head0, head1;
  logic [$clog2(DEPTH+1)-1:0] count;
  logic drop;
  int checks = 0, failures = 0;
  int n_drop = 0, n_rm1_only = 0, n_both = 0;
  logic [W-1:0] model[$];

  input_queue #(.DEPTH(DEPTH), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: count=%0d model=%0d", what, count, model.size());
    end
  endtask

  initial begin
    update = 0; rm0 = 0; rm1 = 0; push = 0; push_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      bit exp_drop;
      @(negedge clk);
      update    = 1;
      rm0       = ($urandom % 3) == 0;
      rm1       = ($urandom % 3) == 0;
      push      = ($urandom % 4) != 0;
      push_data = W'($urandom);
      // model
      if (rm0 && rm1 && model.size() >= 2) begin
        void'(model.pop_front()); void'(model.pop_front()); n_both++;
      end else if (rm0 && model.size() >= 1) begin
        void'(model.pop_front());
        if (rm1 && model.size() >= 1) void'(model.pop_front());
      end else if (rm1 && model.size() >= 2) begin
        model.delete(1); n_rm1_only++;
      end
      exp_drop = 0;
      if (push) begin
        if (model.size() < DEPTH) model.push_back(push_data);
        else exp_drop = 1;
      end
      @(negedge clk);
      update = 0; rm0 = 0; rm1 = 0; push = 0;
      check(drop == exp_drop, "drop");
      if (drop) n_drop++;
      check(int'(count) == model.size(), "count");
      if (model.size() > 0) check(head0 == model[0], "head0");
      if (model.size() > 1) check(head1 == model[1], "head1");
      // nothing changes without update
      @(negedge clk);
      check(int'(count) == model.size(), "hold");
    end
    check(n_drop > 0 && n_rm1_only > 0 && n_both > 0, "coverage");
    $display("drops=%0d rm1_only=%0d both=%0d", n_drop, n_rm1_only, n_both);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
