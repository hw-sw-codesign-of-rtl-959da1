// Time-base prescaler.
//
// Divides the system clock by DIV and gives a one-cycle tick_o every DIV
// clocks. With the 40 MHz system clock and DIV = 40 this is a 1 us tick,
// the unit of the injector opening times (the 1 us unit is this design's
// choice; the clock frequency is that of the target device).
module tick_gen #(
  parameter int unsigned DIV = 40
) (
  input  logic clk,
  input  logic rst_n,
  output logic tick_o
);

  localparam int unsigned CW = (DIV > 1) ? $clog2(DIV) : 1;

  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= '0;
      tick_o <= 1'b0;
    end else if (cnt == CW'(DIV - 1)) begin
      cnt    <= '0;
      tick_o <= 1'b1;
    end else begin
      cnt    <= cnt + 1'b1;
      tick_o <= 1'b0;
    end
  end

endmodule
