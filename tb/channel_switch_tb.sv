// channel_switch_tb: self-checking testbench for the data/ACK gating.
//
// Runs every grant pattern with no grant or one grant (the only ones an
// arbiter produces), then patterns with several grants, each with random
// source data and receiver ACK.  Expected values are computed here bit by
// bit: the receiver sees the OR of the granted sources' data, and ACK goes
// back to granted sources only.
module channel_switch_tb;
  localparam int unsigned N      = 4;
  localparam int unsigned DATA_W = 8;

  logic [N-1:0]             grant;
  logic [N-1:0][DATA_W-1:0] src_data;
  logic                     rcv_ack;
  logic [DATA_W-1:0]        rcv_data;
  logic [N-1:0]             src_ack;

  int checks = 0, failures = 0;

  channel_switch #(.N(N), .DATA_W(DATA_W)) dut (.*);

  task automatic check_now();
    logic [DATA_W-1:0] exp_data;
    logic [N-1:0]      exp_ack;
    exp_data = '0;
    for (int i = 0; i < N; i++) begin
      for (int b = 0; b < DATA_W; b++)
        if (grant[i] && src_data[i][b]) exp_data[b] = 1'b1;
      exp_ack[i] = grant[i] && rcv_ack;
    end
    checks++;
    if (rcv_data !== exp_data || src_ack !== exp_ack) begin
      failures++;
      $display("FAIL grant=%b ack=%b: data=%h exp %h, src_ack=%b exp %b",
               grant, rcv_ack, rcv_data, exp_data, src_ack, exp_ack);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int g = -1; g < int'(N); g++) begin
      for (int k = 0; k < 50; k++) begin
        grant = (g < 0) ? '0 : N'(1) << g;
        for (int i = 0; i < N; i++) src_data[i] = DATA_W'($urandom);
        rcv_ack = 1'($urandom);
        #1;
        check_now();
      end
    end
    for (int k = 0; k < 500; k++) begin
      grant = N'($urandom);
      for (int i = 0; i < N; i++) src_data[i] = DATA_W'($urandom);
      rcv_ack = 1'($urandom);
      #1;
      check_now();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
