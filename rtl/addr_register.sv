// addr_register: W-bit address latch register of the multiplexed address bus.
//
// The RAM receives its 8-bit word address as two 4-bit halves on the same
// bus. One instance (the row register) is loaded by RAS, the other (the column
// register) by CAS. On a rising clock edge with `load` high the register
// takes the bus value `d`; otherwise it holds. `q` drives the decoder that
// follows. The register pair and its width follow the design; the clocked
// load-enable form and the asynchronous active-low reset to zero are this
// design's choice.
//
// Timing: `q` shows the new value one clock edge after `load` and `d` are
// sampled.
module addr_register #(
  parameter int unsigned W = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= '0;
    else if (load) q <= d;
  end

endmodule
