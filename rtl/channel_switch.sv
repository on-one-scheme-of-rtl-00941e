// channel_switch: the data and acknowledge gating between N sources and one
// receiver, driven by the arbiter's grant lines.
//
// For each source i an AND element passes DATA(i) only while grant[i] is 1,
// and one OR element merges the gated data into the receiver's DATA input
// (D4, D5 and D7 in the two-channel scheme; the four AND elements and the OR
// element in the four-channel one).  On the way back an AND element per
// source passes the receiver's ACK only to the granted source (D3 and D6 in
// the two-channel scheme).  With no grant the receiver sees all zeros and no
// source sees ACK.
//
// The logic is purely combinational, with no delay beyond the gates.  DATA is
// DATA_W bits wide per source (the schemes draw a single line; the width is
// this design's parameter).  The ACK return path is drawn for two channels
// only; this design gives it to every channel.
module channel_switch #(
    parameter int unsigned N      = 4,
    parameter int unsigned DATA_W = 1
) (
    input  logic [N-1:0]             grant,
    input  logic [N-1:0][DATA_W-1:0] src_data,
    input  logic                     rcv_ack,
    output logic [DATA_W-1:0]        rcv_data,
    output logic [N-1:0]             src_ack
);

  always_comb begin
    rcv_data = '0;
    for (int i = 0; i < N; i++) begin
      rcv_data |= src_data[i] & {DATA_W{grant[i]}};
    end
  end

  assign src_ack = grant & {N{rcv_ack}};

endmodule
