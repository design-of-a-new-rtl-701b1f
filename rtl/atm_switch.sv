// atm_switch: N x N ATM switch for link-grouped routing with centralized,
// duplicated control.
//
// Cells arrive labelled with the link group they must leave on (a group is a
// set of output links to the same neighbour node, any of which will do). Each
// port controller (PC) holds an input queue. For every one of NP planes a
// central controller (CC) runs a two-phase allocation each slot:
//   phase I : scan the PCs (rotating start) over a parallel bus; each PC asks
//             for its offered cell's group and gets the next free output of
//             that group, or "group busy";
//   phase II: hand every still-free output to an idle PC over a POLL daisy
//             chain; those PCs send test packets.
// Every output then receives exactly one packet per plane, so a Batcher
// sorter alone delivers them and no banyan network is needed. The allocation
// for slot k+1 runs while slot k's packets cross the sorter. Plane 0 is
// offered each queue's head cell and plane 1 the second one (window of two);
// output queues absorb two cells per output per slot. If a plane is taken out
// of service (plane_ok low) the other plane serves the head cells alone.
//
// Timing: the PCs sample in_* on slot_start; packets are launched on the same
// edge, sorted and registered the next cycle, and written to the output
// queues the cycle after; out_* is updated on slot_start. A cell arriving to
// an empty switch leaves on the output two slots after it arrived.
//
// Configuration: cfg_we writes group cfg_group's first port and size-1 into
// both controllers; it takes effect from the next slot. After reset the
// groups are NG equal blocks of N/NG consecutive ports.
module atm_switch #(
  parameter int unsigned N           = atm_pkg::DEF_N,
  parameter int unsigned NG          = atm_pkg::DEF_NG,
  parameter int unsigned NP          = atm_pkg::DEF_NP,
  parameter int unsigned DW          = atm_pkg::DEF_DW,
  parameter int unsigned IQ_DEPTH    = atm_pkg::DEF_IQ_DEPTH,
  parameter int unsigned OQ_DEPTH    = atm_pkg::DEF_OQ_DEPTH,
  parameter int unsigned GMAX        = N,
  parameter int unsigned SLOT_CYCLES = atm_pkg::DEF_SLOT_CYCLES,
  localparam int unsigned AW         = $clog2(N),
  localparam int unsigned GW         = $clog2(NG),
  localparam int unsigned CW         = (GMAX > 1) ? $clog2(GMAX) : 1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // line side, inputs
  input  logic [N-1:0]                  in_valid,
  input  logic [N-1:0][GW-1:0]          in_group,
  input  logic [N-1:0][DW-1:0]          in_data,
  // line side, outputs
  output logic [N-1:0]                  out_valid,
  output logic [N-1:0][DW-1:0]          out_data,
  output logic                          slot_start,
  // planes in service
  input  logic [NP-1:0]                 plane_ok,
  // group table
  input  logic                          cfg_we,
  input  logic [GW-1:0]                 cfg_group,
  input  logic [AW-1:0]                 cfg_base,
  input  logic [CW-1:0]                 cfg_size_m1,
  // status
  output logic [N-1:0]                  iq_drop,
  output logic [N-1:0][$clog2(NP+1)-1:0] oq_drop,
  output logic [N-1:0]                  selftest_err,
  output logic [NP-1:0]                 cc_overrun,
  output logic [NP-1:0]                 cc_done
);

  localparam int unsigned PW = 1 + AW + 1 + DW;

  logic [NP-1:0] plane_act, plane_act_d;
  logic          launch_d;

  // per PC, per plane
  logic [N-1:0][NP-1:0]         pc_req;
  logic [N-1:0][NP-1:0][GW-1:0] pc_iga;
  logic [N:0][NP-1:0]           chain;
  logic [N-1:0][NP-1:0][PW-1:0] pc_pkt;

  // per plane
  logic [NP-1:0]         str, bf, bus_req, poll;
  logic [NP-1:0][AW-1:0] ka, ca, poll_ca;
  logic [NP-1:0][GW-1:0] bus_iga;
  logic [NP-1:0]         sort_strobe;
  logic [NP-1:0][N-1:0][PW-1:0] sort_in, sort_out;
  atm_pkg::cc_phase_e    cc_phase [NP];

  slot_timer #(.SLOT_CYCLES(SLOT_CYCLES)) u_timer (.clk, .rst_n, .slot_start);

  // Planes in service are fixed for a whole slot's allocation; the output
  // side checks the set that was in force when the packets were routed.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      plane_act   <= '0;
      plane_act_d <= '0;
      launch_d    <= 1'b0;
    end else begin
      launch_d <= slot_start;
      if (slot_start) begin
        plane_act   <= plane_ok;
        plane_act_d <= plane_act;
      end
    end
  end

  // Wired-OR phase I buses: only the strobed PC drives its request.
  always_comb begin
    bus_req = '0;
    bus_iga = '0;
    for (int i = 0; i < N; i++) begin
      for (int p = 0; p < NP; p++) begin
        bus_req[p] = bus_req[p] | pc_req[i][p];
        bus_iga[p] = bus_iga[p] | pc_iga[i][p];
      end
    end
  end

  assign chain[0] = poll;

  for (genvar i = 0; i < N; i++) begin : g_pc
    port_controller #(
      .N(N), .NG(NG), .NP(NP), .DW(DW), .IQ_DEPTH(IQ_DEPTH), .PORT_ID(i)
    ) u_pc (
      .clk, .rst_n, .slot_start,
      .in_valid (in_valid[i]),
      .in_group (in_group[i]),
      .in_data  (in_data[i]),
      .plane_en (plane_act),
      .str, .ka,
      .req      (pc_req[i]),
      .iga      (pc_iga[i]),
      .ca, .bf,
      .poll_in  (chain[i]),
      .poll_ca,
      .poll_out (chain[i+1]),
      .pkt_out  (pc_pkt[i]),
      .q_count  (),
      .iq_drop  (iq_drop[i])
    );
  end

  for (genvar p = 0; p < NP; p++) begin : g_plane
    central_control #(.N(N), .NG(NG), .GMAX(GMAX)) u_cc (
      .clk, .rst_n, .slot_start,
      .enable     (plane_ok[p]),
      .cfg_we, .cfg_group, .cfg_base, .cfg_size_m1,
      .str        (str[p]),
      .ka         (ka[p]),
      .req        (bus_req[p]),
      .iga        (bus_iga[p]),
      .ca         (ca[p]),
      .bf         (bf[p]),
      .poll       (poll[p]),
      .poll_ca    (poll_ca[p]),
      .chain_end  (chain[N][p]),
      .phase      (cc_phase[p]),
      .done       (cc_done[p]),
      .overrun    (cc_overrun[p])
    );

    for (genvar i = 0; i < N; i++) begin : g_in
      assign sort_in[p][i] = pc_pkt[i][p];
    end

    batcher_sorter #(.N(N), .DW(DW)) u_bs (
      .clk, .rst_n,
      .in_strobe  (launch_d),
      .in_pkt     (sort_in[p]),
      .out_strobe (sort_strobe[p]),
      .out_pkt    (sort_out[p])
    );
  end

  for (genvar i = 0; i < N; i++) begin : g_oq
    logic [NP-1:0][PW-1:0] oq_in;
    for (genvar p = 0; p < NP; p++) begin : g_in
      assign oq_in[p] = sort_out[p][i];
    end
    output_queue #(
      .N(N), .NP(NP), .DW(DW), .DEPTH(OQ_DEPTH), .PORT_ID(i)
    ) u_oq (
      .clk, .rst_n, .slot_start,
      .in_strobe    (sort_strobe[0]),
      .in_pkt       (oq_in),
      .plane_act    (plane_act_d),
      .out_valid    (out_valid[i]),
      .out_data     (out_data[i]),
      .count        (),
      .drop         (oq_drop[i]),
      .selftest_err (selftest_err[i])
    );
  end

endmodule
