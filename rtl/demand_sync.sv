// demand_sync: brings active-low demand lines from independently clocked
// (or unclocked) sources into the arbiter's clock domain.
//
// Each bit passes through a chain of SYNC_STAGES flip-flops.  Reset loads the
// idle level 1 into every stage, so a source that has not yet driven its line
// is read as "not demanding".  A demand edge appears at `demand_sync_n`
// SYNC_STAGES clock edges after it is stable at `demand_n`.
//
// The original scheme is asynchronous and has no such stage; the synchronizer
// is part of this design's clocked realization of it.
module demand_sync #(
    parameter int unsigned N           = 4,
    parameter int unsigned SYNC_STAGES = 2
) (
    input  logic         clk,
    input  logic         rst_n,
    input  logic [N-1:0] demand_n,
    output logic [N-1:0] demand_sync_n
);

  logic [N-1:0] stage_q[SYNC_STAGES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SYNC_STAGES; s++) stage_q[s] <= '1;
    end else begin
      stage_q[0] <= demand_n;
      for (int s = 1; s < SYNC_STAGES; s++) stage_q[s] <= stage_q[s-1];
    end
  end

  assign demand_sync_n = stage_q[SYNC_STAGES-1];

endmodule
