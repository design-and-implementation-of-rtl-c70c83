// req_sync: synchroniser for the peripheral's DMA request line.
//
// A peripheral clocked independently of the controller may change dma_req
// at any time. The request passes through STAGES flip-flops in the
// controller's clock domain (two by default), so the state machine only
// sees a settled level. The cost is STAGES cycles of extra delay from the
// pin to the IDLE state; the acknowledge-to-write timing is unchanged. The
// request is a level held until acknowledged, so no pulse can be lost.
// Reset clears the chain asynchronously (active low).
//
// The need to work with asynchronous peripherals comes from the design
// description; the two-flop synchroniser realising it is this
// implementation's choice.
module req_sync #(
  parameter int unsigned STAGES = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic async_in,
  output logic sync_out
);

  logic [STAGES-1:0] chain;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) chain <= '0;
    else        chain <= {chain[STAGES-2:0], async_in};
  end

  assign sync_out = chain[STAGES-1];

endmodule
