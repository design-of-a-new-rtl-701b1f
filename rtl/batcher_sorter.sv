// batcher_sorter: the switching fabric of one plane, a Batcher bitonic
// sorting network over N packets followed by an output register.
//
// Packets are ordered by the key {not present, addr}, so packets come first
// in ascending output address and empty inputs last. The controller makes
// sure every output address 0..N-1 is carried by exactly one packet each
// slot (user cells plus test packets), so after sorting position i holds the
// packet for output i and no banyan routing network is needed.
//
// The network has log2(N)*(log2(N)+1)/2 stages of N/2 compare-exchange
// elements and is combinational; the result is registered when in_strobe is
// high and out_strobe follows one cycle later. N must be a power of two.
// Sorting by routing flag follows the design; the bitonic form of Batcher's
// network and the single output register are this design's choice.
module batcher_sorter #(
  parameter int unsigned N  = atm_pkg::DEF_N,
  parameter int unsigned DW = atm_pkg::DEF_DW,
  localparam int unsigned AW = $clog2(N),
  localparam int unsigned PW = 1 + AW + 1 + DW
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_strobe,
  input  logic [N-1:0][PW-1:0] in_pkt,
  output logic                 out_strobe,
  output logic [N-1:0][PW-1:0] out_pkt
);

  localparam int unsigned LOGN = $clog2(N);
  localparam int unsigned NST  = LOGN * (LOGN + 1) / 2;

  logic [N-1:0][PW-1:0] st [NST+1];

  initial begin
    if ((1 << LOGN) != N || N < 2) $fatal(1, "batcher_sorter needs N a power of two");
  end

  function automatic logic [AW:0] key(input logic [PW-1:0] p);
    return {~p[PW-1], p[PW-2 -: AW]};
  endfunction

  assign st[0] = in_pkt;

  for (genvar k = 1; k <= LOGN; k++) begin : g_merge
    for (genvar j = k; j >= 1; j--) begin : g_step
      localparam int unsigned S = k * (k - 1) / 2 + (k - j);
      localparam int unsigned D = 1 << (j - 1);
      for (genvar i = 0; i < N; i++) begin : g_ce
        if ((i & D) == 0) begin : g_lo
          // compare-exchange between i and i+D; the sort direction of the
          // bitonic block of size 2^k that holds i
          localparam bit UP = ((i >> k) & 1) == 0;
          logic swap;
          assign swap = UP ? (key(st[S][i]) > key(st[S][i+D]))
                           : (key(st[S][i]) < key(st[S][i+D]));
          assign st[S+1][i]   = swap ? st[S][i+D] : st[S][i];
          assign st[S+1][i+D] = swap ? st[S][i]   : st[S][i+D];
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_strobe <= 1'b0;
      for (int i = 0; i < N; i++) out_pkt[i] <= '0;
    end else begin
      out_strobe <= in_strobe;
      if (in_strobe) out_pkt <= st[NST];
    end
  end

endmodule
