// slot_timer: divides the controller clock into cell slots.
//
// slot_start is high for one cycle every SLOT_CYCLES cycles, the first time
// one cycle after reset is released. A 2.8 us slot (one 53-octet cell at
// 150 Mb/s) at a 10 ns cycle gives the default of 280 cycles; shorter slots
// may be used as long as the controllers finish their two phases in time.
module slot_timer #(
  parameter int unsigned SLOT_CYCLES = atm_pkg::DEF_SLOT_CYCLES
) (
  input  logic clk,
  input  logic rst_n,
  output logic slot_start
);

  localparam int unsigned TW = $clog2(SLOT_CYCLES + 1);

  logic [TW-1:0] t;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t          <= '0;
      slot_start <= 1'b0;
    end else begin
      slot_start <= (t == '0);
      t          <= (t == TW'(SLOT_CYCLES - 1)) ? '0 : t + 1'b1;
    end
  end

endmodule
