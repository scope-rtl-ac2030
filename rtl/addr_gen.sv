// addr_gen: address generator for the SCoPE memories.
//
// A wrap-around counter. While `en` is high it presents the current address
// on `addr` with `new_addr` high, and advances by one at the clock edge;
// `last` is high together with the final address (DEPTH-1), after which the
// counter returns to 0. `clr` puts it back to 0 synchronously and has
// priority over `en`. The published block diagram only names this unit and
// its "new address" and "last" signals to the control unit; a plain counter
// is this design's choice. Combinational outputs, one address per cycle.
module addr_gen #(
  parameter int unsigned DEPTH  = 400,
  parameter int unsigned ADDR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic              rst,       // synchronous, active high
  input  logic              clr,       // restart at address 0
  input  logic              en,        // issue an address this cycle
  output logic [ADDR_W-1:0] addr,
  output logic              new_addr,  // an address is issued this cycle
  output logic              last       // issued address is DEPTH-1
);

  logic [ADDR_W-1:0] cnt;
  logic              at_end;

  assign at_end   = (cnt == ADDR_W'(DEPTH - 1));
  assign addr     = cnt;
  assign new_addr = en;
  assign last     = en && at_end;

  always_ff @(posedge clk) begin
    if (rst || clr)  cnt <= '0;
    else if (en)     cnt <= at_end ? '0 : cnt + 1'b1;
  end

endmodule
