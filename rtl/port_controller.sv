// port_controller: one port controller (PC) with its input queue.
//
// Each cell slot the central controller of every plane works out, without
// using the sorter, which cells may cross in the next slot:
//   Phase I  - the controller strobes the PCs one by one (str with the port
//              address ka). The selected PC drives the link-group number of
//              the cell it offers to that plane (iga) and a request bit onto
//              the plane's wired-OR bus; in the same cycle the controller
//              answers with the output address ca and the group-busy flag bf.
//              If the PC requested and bf is clear, the PC keeps ca as the
//              cell's routing flag (reserved).
//   Phase II - the controller raises POLL with the address of the next free
//              output. POLL ripples through the PCs; the first PC that is not
//              yet reserved and not yet served takes the address for a test
//              packet and stops the ripple (poll_out low).
// On the next slot boundary (slot_start) the PC launches, per plane, either
// the reserved cell or the test packet, tagged with its address, and removes
// the launched cells from its queue. So the routing flags for slot k+1 are
// built while slot k's cells cross the sorter.
//
// Windowing: with both planes enabled, plane 0 is offered the head cell and
// plane 1 the second cell of the queue; with one plane enabled it is offered
// the head cell. Arrivals (one per slot, already labelled with their link
// group) are taken on slot_start.
//
// From the design: strobe/IGA/CA/BF handshake, POLL daisy chain, test packets
// on idle inputs, the second controller taking the next queued cell. This
// design's own: the wired-OR bus, the packet format (atm_pkg) and the test
// packet contents (the sending port number).
module port_controller #(
  parameter int unsigned N        = atm_pkg::DEF_N,
  parameter int unsigned NG       = atm_pkg::DEF_NG,
  parameter int unsigned NP       = atm_pkg::DEF_NP,
  parameter int unsigned DW       = atm_pkg::DEF_DW,
  parameter int unsigned IQ_DEPTH = atm_pkg::DEF_IQ_DEPTH,
  parameter int unsigned PORT_ID  = 0,
  localparam int unsigned AW      = $clog2(N),
  localparam int unsigned GW      = $clog2(NG),
  localparam int unsigned PW      = 1 + AW + 1 + DW
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          slot_start,
  // arriving cell
  input  logic                          in_valid,
  input  logic [GW-1:0]                 in_group,
  input  logic [DW-1:0]                 in_data,
  // planes taking part in this slot
  input  logic [NP-1:0]                 plane_en,
  // phase I bus, one per plane
  input  logic [NP-1:0]                 str,
  input  logic [NP-1:0][AW-1:0]         ka,
  output logic [NP-1:0]                 req,     // 0 unless selected
  output logic [NP-1:0][GW-1:0]         iga,     // 0 unless selected
  input  logic [NP-1:0][AW-1:0]         ca,
  input  logic [NP-1:0]                 bf,
  // phase II daisy chain, one per plane
  input  logic [NP-1:0]                 poll_in,
  input  logic [NP-1:0][AW-1:0]         poll_ca,
  output logic [NP-1:0]                 poll_out,
  // tagged packet into each plane's sorter, valid from slot_start+1
  output logic [NP-1:0][PW-1:0]         pkt_out,
  // status
  output logic [$clog2(IQ_DEPTH+1)-1:0] q_count,
  output logic                          iq_drop
);

  localparam int unsigned EW = GW + DW;   // queue entry: {group, cell}

  logic [EW-1:0]          head0, head1;
  logic [NP-1:0]          granted, tested, gpos;
  logic [NP-1:0][AW-1:0]  raddr;          // routing flag per plane
  logic [NP-1:0]          sel, offer;
  logic [NP-1:0][1:0]     pos;            // window position offered
  logic                   rm0, rm1;

  input_queue #(.DEPTH(IQ_DEPTH), .W(EW)) u_iq (
    .clk, .rst_n,
    .update   (slot_start),
    .rm0, .rm1,
    .push     (in_valid),
    .push_data({in_group, in_data}),
    .head0, .head1,
    .count    (q_count),
    .drop     (iq_drop)
  );

  // Window position of each plane: the number of enabled planes below it.
  always_comb begin
    for (int p = 0; p < NP; p++) begin
      int unsigned k;
      k = 0;
      for (int q = 0; q < p; q++) k += int'(plane_en[q]);
      pos[p]   = (k > 2) ? 2'd2 : 2'(k);
      offer[p] = plane_en[p] && (pos[p] < 2) && (int'(q_count) > int'(pos[p]));
      sel[p]   = str[p] && (ka[p] == AW'(PORT_ID));
      req[p]   = sel[p] && offer[p];
      iga[p]   = (sel[p] && offer[p]) ? (pos[p] == 0 ? head0[EW-1 -: GW] : head1[EW-1 -: GW]) : '0;
      poll_out[p] = poll_in[p] && (granted[p] || tested[p] || !plane_en[p]);
    end
  end

  // Cells launched at this boundary leave the queue.
  always_comb begin
    rm0 = 1'b0;
    rm1 = 1'b0;
    for (int p = 0; p < NP; p++) begin
      if (granted[p] && !gpos[p]) rm0 = 1'b1;
      if (granted[p] &&  gpos[p]) rm1 = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      granted <= '0;
      tested  <= '0;
      gpos    <= '0;
      raddr   <= '0;
      pkt_out <= '0;
    end else if (slot_start) begin
      for (int p = 0; p < NP; p++) begin
        if (granted[p])
          pkt_out[p] <= {1'b1, raddr[p], 1'b1, (gpos[p] ? head1[DW-1:0] : head0[DW-1:0])};
        else if (tested[p])
          pkt_out[p] <= {1'b1, raddr[p], 1'b0, DW'(PORT_ID)};
        else
          pkt_out[p] <= '0;
      end
      granted <= '0;
      tested  <= '0;
    end else begin
      for (int p = 0; p < NP; p++) begin
        if (req[p] && !bf[p]) begin
          granted[p] <= 1'b1;
          gpos[p]    <= pos[p][0];
          raddr[p]   <= ca[p];
        end else if (poll_in[p] && !poll_out[p]) begin
          tested[p]  <= 1'b1;
          raddr[p]   <= poll_ca[p];
        end
      end
    end
  end

endmodule
