// arbiter_top_tb: end-to-end testbench of both schemes at default parameters.
//
// Two sources share receiver R2 through the RS flip-flop arbiter and four
// share receiver R4 through the NOR-ring arbiter.  Each source is a process
// that waits a random time, pulls its demand line low, waits for its READY
// (grant), works with the receiver for a random number of cycles while
// driving random data, then releases.  Every source completes JOBS such jobs.
// All sources demand on the same edge at the start, so both schemes also see
// simultaneous requests.
//
// On every falling edge the outputs are compared with a reference model of
// each arbiter kept here (demands delayed SYNC_STAGES edges, holder keeps the
// grant, else the lowest-numbered demand wins): READY, receiver data (the
// holder's data or zero) and the ACK returned to each source.  Each mechanism
// of the schemes is counted - grant from the initial state, hold against a
// competing demand, direct hand-over on release, simultaneous request, return
// to the initial state, ACK returned to the holder - and one that never
// occurs counts as a failure.
module arbiter_top_tb;
  localparam int unsigned DATA_W      = 1;   // top's default
  localparam int unsigned SYNC_STAGES = 2;   // top's default
  localparam int          JOBS        = 25;

  logic clk = 1'b0;
  logic rst_n;
  logic [1:0]             dem2_n;
  logic [1:0][DATA_W-1:0] data2;
  logic [1:0]             ready2, ack2;
  logic [DATA_W-1:0]      rcv2_data;
  logic                   rcv2_ack;
  logic [3:0]             dem4_n;
  logic [3:0][DATA_W-1:0] data4;
  logic [3:0]             ready4, ack4;
  logic [DATA_W-1:0]      rcv4_data;
  logic                   rcv4_ack;

  int checks = 0, failures = 0;

  arbiter_top dut (.*);

  always #5 clk = ~clk;

  // ---------------- reference models ----------------
  function automatic logic [3:0] next_grant(logic [3:0] g, logic [3:0] req);
    if ((g & req) != '0) return g;
    for (int i = 0; i < 4; i++) if (req[i]) return 4'(1) << i;
    return '0;
  endfunction

  logic [1:0] h2[SYNC_STAGES];
  logic [3:0] h4[SYNC_STAGES];
  logic [1:0] m2;
  logic [3:0] m4;

  // mechanism counters, [0] two-channel, [1] four-channel
  int n_grant[2], n_hold[2], n_handover[2], n_tie[2], n_idle[2], n_ack[2];

  task automatic count(int s, logic [3:0] g, logic [3:0] req);
    if (g == '0 && req != '0) n_grant[s]++;
    if ((g & req) != '0 && (req & ~g) != '0) n_hold[s]++;
    if (g != '0 && (g & req) == '0 && req != '0) n_handover[s]++;
    if ((g & req) == '0 && $countones(req) > 1) n_tie[s]++;
    if (g != '0 && req == '0) n_idle[s]++;
  endtask

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SYNC_STAGES; s++) begin
        h2[s] <= '1;
        h4[s] <= '1;
      end
      m2 <= '0;
      m4 <= '0;
    end else begin
      logic [3:0] r2, r4;
      r2 = {2'b00, ~h2[SYNC_STAGES-1]};
      r4 = ~h4[SYNC_STAGES-1];
      count(0, {2'b00, m2}, r2);
      count(1, m4, r4);
      m2 <= 2'(next_grant({2'b00, m2}, r2));
      m4 <= next_grant(m4, r4);
      h2[0] <= dem2_n;
      h4[0] <= dem4_n;
      for (int s = 1; s < SYNC_STAGES; s++) begin
        h2[s] <= h2[s-1];
        h4[s] <= h4[s-1];
      end
    end
  end

  // ---------------- checker ----------------
  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  always @(negedge clk) begin
    if (rst_n) begin
      logic [DATA_W-1:0] e2, e4;
      e2 = '0;
      e4 = '0;
      for (int i = 0; i < 2; i++) if (m2[i]) e2 = data2[i];
      for (int i = 0; i < 4; i++) if (m4[i]) e4 = data4[i];
      check(ready2 == m2, "two-channel READY");
      check(ready4 == m4, "four-channel READY");
      check(rcv2_data == e2, "two-channel receiver data");
      check(rcv4_data == e4, "four-channel receiver data");
      check(ack2 == (m2 & {2{rcv2_ack}}), "two-channel ACK");
      check(ack4 == (m4 & {4{rcv4_ack}}), "four-channel ACK");
      if (|ack2) n_ack[0]++;
      if (|ack4) n_ack[1]++;
      // receivers answer at random and sources change data at random
      rcv2_ack = 1'($urandom);
      rcv4_ack = 1'($urandom);
      data2 = {DATA_W'($urandom), DATA_W'($urandom)};
      for (int i = 0; i < 4; i++) data4[i] = DATA_W'($urandom);
    end
  end

  // ---------------- sources ----------------
  int done2[2], done4[4];

  task automatic source(bit four, int idx);
    for (int j = 0; j < JOBS; j++) begin
      if (j > 0) repeat ($urandom_range(0, 12)) @(negedge clk);
      if (four) dem4_n[idx] = 1'b0; else dem2_n[idx] = 1'b0;
      forever begin
        @(negedge clk);
        if (four ? ready4[idx] : ready2[idx]) break;
      end
      repeat ($urandom_range(1, 15)) @(negedge clk);
      if (four) dem4_n[idx] = 1'b1; else dem2_n[idx] = 1'b1;
      // stay off long enough for the release to be seen
      repeat (SYNC_STAGES + 1) @(negedge clk);
      if (four) done4[idx]++; else done2[idx]++;
    end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    dem2_n = '1;
    dem4_n = '1;
    data2 = '0;
    data4 = '0;
    rcv2_ack = 1'b0;
    rcv4_ack = 1'b0;
    rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    fork
      source(1'b0, 0);
      source(1'b0, 1);
      source(1'b1, 0);
      source(1'b1, 1);
      source(1'b1, 2);
      source(1'b1, 3);
    join
    repeat (SYNC_STAGES + 3) @(negedge clk);
    check(ready2 == '0 && ready4 == '0, "initial state at the end");
    for (int i = 0; i < 2; i++) check(done2[i] == JOBS, "two-channel source finished its jobs");
    for (int i = 0; i < 4; i++) check(done4[i] == JOBS, "four-channel source finished its jobs");
    for (int s = 0; s < 2; s++) begin
      $display("%s: grants=%0d holds=%0d handovers=%0d simultaneous=%0d idle_returns=%0d acks=%0d",
               s == 0 ? "two-channel " : "four-channel", n_grant[s], n_hold[s], n_handover[s],
               n_tie[s], n_idle[s], n_ack[s]);
      check(n_grant[s] > 0, "grant from initial state seen");
      check(n_hold[s] > 0, "hold against competitor seen");
      check(n_handover[s] > 0, "hand-over seen");
      check(n_tie[s] > 0, "simultaneous request seen");
      check(n_idle[s] > 0, "return to initial state seen");
      check(n_ack[s] > 0, "ACK to holder seen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
