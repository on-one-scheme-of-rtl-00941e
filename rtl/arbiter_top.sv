// arbiter_top: the two arbitration schemes side by side.
//
// Two-channel scheme: sources S1 and S2 share receiver R2 through an RS
// flip-flop arbiter (rs_arbiter) and a two-channel data/ACK switch.  Each
// source's DEM line goes to R or S; Q and Qbar are returned to the sources as
// READY, and open the data path to the receiver and the ACK path back.
//
// Four-channel scheme: sources S1-S4 share receiver R4 (a printer in the
// original application) through a four-input NOR-ring arbiter (nor_arbiter)
// and a four-channel switch; the grants are returned as READY.
//
// The two schemes share only clk and rst_n.  All demand lines are active low
// and asynchronous to clk; the grants follow them SYNC_STAGES+1 rising edges
// later, and data and ACK pass the switches combinationally.  Sources and
// receivers are outside this design: their lines are the ports.
module arbiter_top #(
    parameter int unsigned DATA_W      = 1,
    parameter int unsigned SYNC_STAGES = 2
) (
    input  logic                  clk,
    input  logic                  rst_n,
    // two-channel scheme
    input  logic [1:0]            dem2_n,     // DEM of S1 (bit 0) and S2 (bit 1)
    input  logic [1:0][DATA_W-1:0] data2,     // DATA of S1, S2
    output logic [1:0]            ready2,     // READY to S1 (Q), S2 (Qbar)
    output logic [1:0]            ack2,       // ACK to S1, S2
    output logic [DATA_W-1:0]     rcv2_data,  // DATA into receiver R2
    input  logic                  rcv2_ack,   // ACK from receiver R2
    // four-channel scheme
    input  logic [3:0]            dem4_n,     // DEMAND1..DEMAND4
    input  logic [3:0][DATA_W-1:0] data4,     // DATA1..DATA4
    output logic [3:0]            ready4,     // grant of each source
    output logic [3:0]            ack4,       // ACK to each source
    output logic [DATA_W-1:0]     rcv4_data,  // DATA into receiver R4
    input  logic                  rcv4_ack    // ACK from receiver R4
);

  logic q, q_bar;

  rs_arbiter #(.SYNC_STAGES(SYNC_STAGES)) u_arb2 (
      .clk  (clk),
      .rst_n(rst_n),
      .r_n  (dem2_n[0]),
      .s_n  (dem2_n[1]),
      .q    (q),
      .q_bar(q_bar)
  );

  assign ready2 = {q_bar, q};

  channel_switch #(.N(2), .DATA_W(DATA_W)) u_sw2 (
      .grant   (ready2),
      .src_data(data2),
      .rcv_ack (rcv2_ack),
      .rcv_data(rcv2_data),
      .src_ack (ack2)
  );

  nor_arbiter #(.N(4), .SYNC_STAGES(SYNC_STAGES)) u_arb4 (
      .clk     (clk),
      .rst_n   (rst_n),
      .demand_n(dem4_n),
      .grant   (ready4)
  );

  channel_switch #(.N(4), .DATA_W(DATA_W)) u_sw4 (
      .grant   (ready4),
      .src_data(data4),
      .rcv_ack (rcv4_ack),
      .rcv_data(rcv4_data),
      .src_ack (ack4)
  );

endmodule
