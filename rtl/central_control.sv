// central_control: the RAM-based central controller (CC) of one plane.
//
// One word per link group holds
//   RT   : base (first output port of the group) and size_m1 (ports - 1),
//          written through the configuration port, so groups can be
//          re-arranged at run time;
//   work : ca (next free output of the group), cnt (outputs reserved so far)
//          and the busy flag b, log2(N) + log2(GMAX) + 1 bits;
//   rr   : where phase I stopped in the group last slot.
// An incrementer (INC) advances ca (wrapping from the group's last output to
// its first) and cnt, and a comparator (COMP) sets b when the output just
// handed out was the group's last free one.
//
// Links of a group are interchangeable, so each slot the group's outputs are
// handed out starting at rr, the output after the last one phase I granted
// in the previous slot (round robin over the group's links). Without this the
// first link of every group would receive a cell from each plane nearly every
// slot while the last link stayed idle, and its output queue would overflow. A multiplexer (Mx) addresses the
// RAM with the port controller's group number in phase I and with the
// internal group counter in phase II.
//
// Sequence in every slot (CCU), started by slot_start:
//   INIT  NG cycles : each group's work part is reset: ca = rr (or the
//                     group's first output if the group was re-arranged),
//                     cnt = 0, b = 0.
//   PH1   N cycles  : str is high and ka (Acnt) walks all ports, starting one
//                     port further on every slot (rotating priority). The
//                     selected PC's request (req, iga) arrives on the bus, ca
//                     and bf are returned in the same cycle, and the word is
//                     advanced if the request is granted.
//   PH2             : the group counter walks the groups; a full group (b set)
//                     costs one cycle and is skipped, otherwise poll is raised
//                     with the group's next free output; the first unreserved
//                     PC on the chain takes it. Ends when the groups or the
//                     unreserved PCs (chain_end: poll passed every PC) run out.
//   DONE            : wait for the next slot.
// Worst case: NG + N + (N - smallest group) + NG cycles, within the 280
// cycles of a 2.8 us slot at 10 ns for N up to 128 with 8 groups. A
// slot_start before DONE raises `overrun` for one cycle.
//
// The RAM is read asynchronously and written at the end of the cycle, so one
// request is served per cycle. The group table, the algorithm and the field
// widths follow the design; the INIT pass, the round-robin start (rr) and
// the one-cycle cost of skipping a full group in phase II are this design's
// own.
module central_control #(
  parameter int unsigned N       = atm_pkg::DEF_N,
  parameter int unsigned NG      = atm_pkg::DEF_NG,
  parameter int unsigned GMAX    = atm_pkg::DEF_N,   // largest group size
  localparam int unsigned AW     = $clog2(N),
  localparam int unsigned GW     = $clog2(NG),
  localparam int unsigned CW     = (GMAX > 1) ? $clog2(GMAX) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          slot_start,
  input  logic          enable,       // plane in service for the coming slot
  // configuration of the RT part
  input  logic          cfg_we,
  input  logic [GW-1:0] cfg_group,
  input  logic [AW-1:0] cfg_base,
  input  logic [CW-1:0] cfg_size_m1,
  // phase I bus
  output logic          str,
  output logic [AW-1:0] ka,
  input  logic          req,
  input  logic [GW-1:0] iga,
  output logic [AW-1:0] ca,
  output logic          bf,
  // phase II chain
  output logic          poll,
  output logic [AW-1:0] poll_ca,
  input  logic          chain_end,
  // status
  output atm_pkg::cc_phase_e phase,
  output logic          done,
  output logic          overrun
);
  import atm_pkg::*;

  typedef struct packed {
    logic [AW-1:0] base;
    logic [CW-1:0] size_m1;
  } rt_t;

  typedef struct packed {
    logic [AW-1:0] ca;
    logic [CW-1:0] cnt;
    logic          b;
    logic [AW-1:0] rr;
  } work_t;

  rt_t       rt   [NG];
  work_t     work [NG];

  cc_phase_e     state;
  logic [AW:0]   idx;       // INIT group index / PH1 step count
  logic [AW-1:0] acnt;      // first port scanned in this slot
  logic [GW:0]   gcnt;      // PH2 group counter

  // Mx: RAM address and the word read there.
  logic [GW-1:0] ram_a;
  logic          ram_a_ok;
  work_t         rd;
  logic [CW-1:0] rd_sz;
  logic [AW-1:0] rd_base;
  rt_t           ini_rt;
  work_t         ini_w;
  logic [AW:0]   ini_last;
  work_t         inc;

  initial begin
    if ((1 << AW) != N) $fatal(1, "N must be a power of two");
  end

  always_comb begin
    if (state == CC_PH2) begin
      ram_a    = gcnt[GW-1:0];
      ram_a_ok = (gcnt < (GW+1)'(NG));
    end else begin
      ram_a    = iga;
      ram_a_ok = (32'(iga) < NG);
    end
    rd      = ram_a_ok ? work[ram_a] : '{ca: '0, cnt: '0, b: 1'b1, rr: '0};
    rd_sz   = ram_a_ok ? rt[ram_a].size_m1 : '0;
    rd_base = ram_a_ok ? rt[ram_a].base : '0;
    // INC (wrapping within the group) and COMP
    inc.ca  = (rd.ca == rd_base + AW'(rd_sz)) ? rd_base : rd.ca + 1'b1;
    inc.cnt = rd.cnt + 1'b1;
    inc.b   = (rd.cnt == rd_sz);
    inc.rr  = (state == CC_PH1) ? inc.ca : rd.rr;
    // INIT: restart each group at its round-robin point, or at its first
    // output if the point lies outside the (re-arranged) group
    ini_rt   = rt[idx[GW-1:0]];
    ini_w    = work[idx[GW-1:0]];
    ini_last = {1'b0, ini_rt.base} + (AW+1)'(ini_rt.size_m1);
    if (ini_w.rr < ini_rt.base || {1'b0, ini_w.rr} > ini_last) ini_w.rr = ini_rt.base;
    ini_w.ca  = ini_w.rr;
    ini_w.cnt = '0;
    ini_w.b   = 1'b0;
  end

  assign phase   = state;
  assign done    = (state == CC_DONE);
  assign str     = (state == CC_PH1);
  assign ka      = acnt + idx[AW-1:0];
  assign ca      = rd.ca;
  assign bf      = rd.b;
  assign poll    = (state == CC_PH2) && ram_a_ok && !rd.b;
  assign poll_ca = rd.ca;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= CC_IDLE;
      idx     <= '0;
      acnt    <= '0;
      gcnt    <= '0;
      overrun <= 1'b0;
      for (int g = 0; g < NG; g++) begin
        rt[g]   <= '{base: AW'(g * (N / NG)), size_m1: CW'(N / NG - 1)};
        work[g] <= '0;
      end
    end else begin
      overrun <= 1'b0;
      if (cfg_we && 32'(cfg_group) < NG) begin
        rt[cfg_group] <= '{base: cfg_base, size_m1: cfg_size_m1};
      end
      if (slot_start) begin
        overrun <= (state == CC_INIT) || (state == CC_PH1) || (state == CC_PH2);
        state   <= enable ? CC_INIT : CC_IDLE;
        idx     <= '0;
        gcnt    <= '0;
        if (state != CC_IDLE) acnt <= acnt + 1'b1;   // rotate scan start
      end else begin
        unique case (state)
          CC_INIT: begin
            work[idx[GW-1:0]] <= ini_w;
            if (idx == (AW+1)'(NG - 1)) begin
              state <= CC_PH1;
              idx   <= '0;
            end else begin
              idx <= idx + 1'b1;
            end
          end
          CC_PH1: begin
            if (req && !rd.b && ram_a_ok) work[ram_a] <= inc;
            if (idx == (AW+1)'(N - 1)) begin
              state <= CC_PH2;
              gcnt  <= '0;
            end else begin
              idx <= idx + 1'b1;
            end
          end
          CC_PH2: begin
            if (!ram_a_ok) begin
              state <= CC_DONE;
            end else if (rd.b) begin
              gcnt <= gcnt + 1'b1;
            end else if (chain_end) begin
              state <= CC_DONE;
            end else begin
              work[ram_a] <= inc;
              if (inc.b) gcnt <= gcnt + 1'b1;
            end
          end
          default: ;
        endcase
      end
    end
  end

  // A group never hands out more outputs than it has.
  a_grant_within_group: assert property (@(posedge clk) disable iff (!rst_n)
    ((str && req && !bf) || (poll && !chain_end)) |-> (rd.cnt <= rd_sz));

endmodule
