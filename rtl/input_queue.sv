// input_queue: the input buffer (IQ) of one port controller.
//
// A FIFO of DEPTH entries that shows its first two entries at once, so that
// two switching planes can each be offered a cell in the same slot (a
// look-ahead window of depth 2). All changes happen on the cycle `update` is
// high, once per cell slot: first the entries flagged by rm0 (head) and rm1
// (second) are removed and the rest close up in order, then the arriving
// entry (push) is appended. An arrival that finds the queue still full is
// lost and `drop` is high for the next cycle.
//
// Storage is a register array that shifts on removal; at the sizes used here
// (tens of entries) this is simpler than a pointer-based RAM and lets both
// head entries be read without a second read port. The window of two and
// removal of either entry follow the duplicated switch; the shifting
// organisation is this design's own.
module input_queue #(
  parameter int unsigned DEPTH = atm_pkg::DEF_IQ_DEPTH,
  parameter int unsigned W     = 8
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       update,     // slot boundary
  input  logic                       rm0,        // remove head entry
  input  logic                       rm1,        // remove second entry
  input  logic                       push,       // an entry arrives
  input  logic [W-1:0]               push_data,
  output logic [W-1:0]               head0,
  output logic [W-1:0]               head1,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic                       drop
);

  localparam int unsigned CW = $clog2(DEPTH+1);

  logic [W-1:0]  mem [DEPTH];
  logic [W-1:0]  mem_nx [DEPTH];
  logic [CW-1:0] cnt_nx;
  logic          drop_nx;

  initial begin
    if (DEPTH < 2) $fatal(1, "input_queue needs DEPTH >= 2 for the window of two");
  end

  assign head0 = mem[0];
  assign head1 = mem[1];

  always_comb begin
    logic          r0, r1;
    logic [CW-1:0] kept;
    r0 = rm0 && (count > 0);
    r1 = rm1 && (count > 1);
    kept = count - CW'(r0) - CW'(r1);
    for (int i = 0; i < DEPTH; i++) begin
      if (r0 && r1)  mem_nx[i] = (i + 2 < DEPTH) ? mem[i+2] : '0;
      else if (r0)   mem_nx[i] = (i + 1 < DEPTH) ? mem[i+1] : '0;
      else if (r1)   mem_nx[i] = (i == 0) ? mem[0] : ((i + 1 < DEPTH) ? mem[i+1] : '0);
      else           mem_nx[i] = mem[i];
    end
    cnt_nx  = kept;
    drop_nx = 1'b0;
    if (push) begin
      if (kept < CW'(DEPTH)) begin
        mem_nx[kept] = push_data;
        cnt_nx       = kept + 1'b1;
      end else begin
        drop_nx = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
      drop  <= 1'b0;
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else begin
      drop <= update && drop_nx;
      if (update) begin
        count <= cnt_nx;
        for (int i = 0; i < DEPTH; i++) mem[i] <= mem_nx[i];
      end
    end
  end

endmodule
