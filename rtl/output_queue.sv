// output_queue: the output buffer (OQ) of one output port, with the
// self-test check on the packets it receives.
//
// With two switching planes an output can be given one cell by each plane in
// the same slot, but its line sends only one per slot, so cells wait here.
// On in_strobe (the sorters' outputs for this port are valid) the packet of
// each plane is examined in plane order:
//   - a plane that was in service must deliver a packet (cell or test
//     packet) whose address is this port; otherwise selftest_err is raised
//     for one cycle. This is the on-line self test that test packets allow;
//   - a user cell (live) is appended to the queue, or lost if it is full
//     (`drop` gives how many were lost);
//   - a test packet is discarded.
// On slot_start the head cell, if any, is moved to out_data with out_valid
// high for that slot (one cell per slot on the line).
//
// Output buffering, its purpose and the test packets follow the design; the
// plane-order of simultaneous writes and the form of the self-test check are
// this design's own.
module output_queue #(
  parameter int unsigned N        = atm_pkg::DEF_N,
  parameter int unsigned NP       = atm_pkg::DEF_NP,
  parameter int unsigned DW       = atm_pkg::DEF_DW,
  parameter int unsigned DEPTH    = atm_pkg::DEF_OQ_DEPTH,
  parameter int unsigned PORT_ID  = 0,
  localparam int unsigned AW      = $clog2(N),
  localparam int unsigned PW      = 1 + AW + 1 + DW
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       slot_start,
  input  logic                       in_strobe,
  input  logic [NP-1:0][PW-1:0]      in_pkt,
  input  logic [NP-1:0]              plane_act,   // planes that routed this slot
  output logic                       out_valid,
  output logic [DW-1:0]              out_data,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic [$clog2(NP+1)-1:0]    drop,
  output logic                       selftest_err
);

  localparam int unsigned CW = $clog2(DEPTH+1);

  logic [DW-1:0] mem    [DEPTH];
  logic [DW-1:0] mem_nx [DEPTH];
  logic [CW-1:0] cnt_nx;
  logic [$clog2(NP+1)-1:0] drop_nx;
  logic          err_nx;

  always_comb begin
    logic pop;
    pop = slot_start && (count != 0);
    for (int i = 0; i < DEPTH; i++)
      mem_nx[i] = pop ? ((i + 1 < DEPTH) ? mem[i+1] : '0) : mem[i];
    cnt_nx  = count - CW'(pop);
    drop_nx = '0;
    err_nx  = 1'b0;
    if (in_strobe) begin
      for (int p = 0; p < NP; p++) begin
        if (plane_act[p]) begin
          if (!in_pkt[p][PW-1] || in_pkt[p][PW-2 -: AW] != AW'(PORT_ID)) err_nx = 1'b1;
        end
        if (in_pkt[p][PW-1] && in_pkt[p][DW] && in_pkt[p][PW-2 -: AW] == AW'(PORT_ID)) begin
          if (cnt_nx < CW'(DEPTH)) begin
            mem_nx[cnt_nx] = in_pkt[p][DW-1:0];
            cnt_nx         = cnt_nx + 1'b1;
          end else begin
            drop_nx = drop_nx + 1'b1;
          end
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count        <= '0;
      out_valid    <= 1'b0;
      out_data     <= '0;
      drop         <= '0;
      selftest_err <= 1'b0;
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else begin
      count        <= cnt_nx;
      drop         <= drop_nx;
      selftest_err <= err_nx;
      for (int i = 0; i < DEPTH; i++) mem[i] <= mem_nx[i];
      if (slot_start) begin
        out_valid <= (count != 0);
        out_data  <= mem[0];
      end
    end
  end

endmodule
