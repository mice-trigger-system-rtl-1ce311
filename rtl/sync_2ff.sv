// sync_2ff: two-flop synchroniser for the asynchronous front-panel inputs.
//
// Each bit of `d` is sampled by two flip-flops in series on `clk`, so `q`
// follows `d` two clock cycles later. Reset clears both stages. The
// front-panel inputs of the trigger engine (PMT discriminator outputs, GVA,
// Machine Start, external gate and veto, readout busies) all pass through
// one of these; the double sampling is this design's choice.
module sync_2ff #(
  parameter int unsigned WIDTH = 1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  logic [WIDTH-1:0] meta;

  always_ff @(posedge clk) begin
    if (rst) begin
      meta <= '0;
      q    <= '0;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule
