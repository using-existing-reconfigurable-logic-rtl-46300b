// scan_reg: the registered scan-data bus.
//
// One flip-flop per scan chain between the multiplexer layer and the
// SerDes/TSV link to the die under test, so the die sees clean, registered
// scan-in bits. With `load` high the register takes the multiplexer outputs;
// with `load` low it takes zeros, so the bus rests at 0 between chain loads
// and during the final unload (zero fill is this design's choice). Reset is
// synchronous, active high. Latency: one clock.
module scan_reg #(
  parameter int unsigned N_CHAINS = 3
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                load,
  input  logic [N_CHAINS-1:0] d,
  output logic [N_CHAINS-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst)       q <= '0;
    else if (load) q <= d;
    else           q <= '0;
  end

endmodule
