// tb_controller - checks the synchronisation and timing logic on its own.
//
// The four processing elements are replaced by behavioural models that
// answer each start pulse with a done pulse after a random number of
// clocks; the stats FIFO's room signal is dropped for long stretches.
// The test checks that every element is launched in TU order with the
// right TU type and memory halves (halves alternate per memory, and per TU
// type for the transpose and output memories), that no element is launched
// onto a full destination or from an empty source, that nothing reaches
// the second pass while the stats FIFO is full, and that each stats record
// carries the TU type and the exact P1 and P2 durations the models used.
module tb_controller;
  import hevc_it_pkg::*;

  localparam int NTU = 60;

  logic     clk = 1'b0;
  logic     rst_n = 1'b0;
  logic     in_bank_free, in_wr_bank;
  logic     tu_in_done = 1'b0;
  tu_type_e tu_in_type = TU_DST4;
  logic     p1_start, p1_in_bank, p1_tr_bank, p1_done;
  tu_type_e p1_start_type, p1_type;
  logic     p2_start, p2_tr_bank, p2_out_bank, p2_done;
  tu_type_e p2_start_type, p2_type;
  logic     out_start, out_start_bank, out_busy, out_done;
  tu_type_e out_start_type;
  logic     stats_room = 1'b1;
  logic     stats_push;
  stats_t   stats_rec;

  always #5 clk = ~clk;

  controller dut (.*);

  int checks = 0;
  int failures = 0;
  int cyc = 0;
  tu_type_e tu_t [NTU];
  int d1 [NTU], d2 [NTU], d3 [NTU];

  task automatic fail(string msg);
    failures++;
    $display("clock %0d: %s", cyc, msg);
  endtask

  initial
    for (int i = 0; i < NTU; i++) begin
      tu_t[i] = tu_type_e'($urandom_range(0, 4));
      d1[i] = $urandom_range(3, 12);
      d2[i] = $urandom_range(3, 40);
      d3[i] = $urandom_range(2, 60);
    end

  // ---- producer of filled input halves ----------------------------------
  int n_in = 0;
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    while (n_in < NTU) begin
      @(negedge clk);
      tu_in_done = 1'b0;
      if (in_bank_free && $urandom_range(0, 2) == 0) begin
        checks++;
        if (in_wr_bank != n_in[0]) fail("input half out of turn");
        tu_in_done = 1'b1;
        tu_in_type = tu_t[n_in];
        n_in++;
      end
    end
    @(negedge clk);
    tu_in_done = 1'b0;
  end

  // ---- models of P1, P2 and the output transfer -------------------------
  int n_p1 = 0, n_p2 = 0, n_out = 0, n_stats = 0;
  int p1_cnt = 0, p2_cnt = 0, out_cnt = 0;
  int p1_left = 0, p2_left = 0, out_left = 0;
  int seen_t1 [5] = '{default: 0};
  int seen_t2 [5] = '{default: 0};
  int seen_to [5] = '{default: 0};
  int tr_full [5] = '{default: 0};
  int om_full [5] = '{default: 0};
  bit p1_chk = 1'b0, p2_chk = 1'b0;
  int tr_hold = 0, om_hold = 0, st_hold = 0;

  assign p1_done  = (p1_left == 1);
  assign p2_done  = (p2_left == 1);
  assign out_done = (out_left == 1);
  assign out_busy = (out_left != 0);

  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      // P1
      if (p1_left > 0) p1_left <= p1_left - 1;
      if (p1_start) begin
        checks <= checks + 3;
        if (p1_left != 0) fail("P1 launched while busy");
        if (p1_start_type != tu_t[n_p1]) fail("P1 TU out of order");
        if (tr_full[p1_start_type] >= 2) fail("P1 launched onto a full transpose memory");
        p1_left <= d1[n_p1];
        p1_chk  <= 1'b1;
      end
      p1_chk <= p1_start;
      if (p1_chk) begin
        checks <= checks + 2;
        if (p1_in_bank != n_p1[0]) fail("P1 input half wrong");
        if (p1_tr_bank != seen_t1[p1_type][0]) fail("P1 transpose half wrong");
        n_p1 <= n_p1 + 1;
        seen_t1[p1_type] <= seen_t1[p1_type] + 1;
      end
      // P2
      if (p2_left > 0) p2_left <= p2_left - 1;
      if (p2_start) begin
        checks <= checks + 4;
        if (p2_left != 0) fail("P2 launched while busy");
        if (p2_start_type != tu_t[n_p2]) fail("P2 TU out of order");
        if (om_full[p2_start_type] >= 2) fail("P2 launched onto a full output memory");
        if (tr_full[p2_start_type] == 0) fail("P2 launched from an empty transpose memory");
        if (!stats_room) fail("P2 launched with the stats FIFO full");
        p2_left <= d2[n_p2];
      end
      p2_chk <= p2_start;
      if (p2_chk) begin
        checks <= checks + 2;
        if (p2_tr_bank != seen_t2[p2_type][0]) fail("P2 transpose half wrong");
        if (p2_out_bank != seen_t2[p2_type][0]) fail("P2 output half wrong");
        n_p2 <= n_p2 + 1;
        seen_t2[p2_type] <= seen_t2[p2_type] + 1;
      end
      // output transfer
      if (out_left > 0) out_left <= out_left - 1;
      if (out_start) begin
        checks <= checks + 3;
        if (out_left != 0) fail("output transfer launched while busy");
        if (out_start_type != tu_t[n_out]) fail("output TU out of order");
        if (out_start_bank != seen_to[out_start_type][0]) fail("output half wrong");
        out_left <= d3[n_out];
        seen_to[out_start_type] <= seen_to[out_start_type] + 1;
        n_out <= n_out + 1;
      end
      // full-half bookkeeping of the model
      for (int t = 0; t < 5; t++) begin
        tr_full[t] <= tr_full[t] + int'(p1_done && p1_type == tu_type_e'(t))
                                 - int'(p2_done && p2_type == tu_type_e'(t));
        om_full[t] <= om_full[t] + int'(p2_done && p2_type == tu_type_e'(t))
                                 - int'(out_done && tu_t[n_out - 1] == tu_type_e'(t));
      end
      // stall observations
      if (dut.in_full[dut.in_rd] && p1_left == 0 && !p1_start && tr_full[dut.in_type[dut.in_rd]] == 2)
        tr_hold <= tr_hold + 1;
      if (dut.q12_valid && p2_left == 0 && !p2_start && !stats_room) st_hold <= st_hold + 1;
      if (dut.q12_valid && p2_left == 0 && om_full[p2_start_type] == 2) om_hold <= om_hold + 1;
      // stats records
      if (stats_push) begin
        checks <= checks + 3;
        if (stats_rec.tu_type != tu_t[n_stats]) fail("stats type wrong");
        if (int'(stats_rec.p1_cycles) != d1[n_stats]) fail($sformatf("stats P1 %0d, expected %0d", stats_rec.p1_cycles, d1[n_stats]));
        if (int'(stats_rec.p2_cycles) != d2[n_stats]) fail($sformatf("stats P2 %0d, expected %0d", stats_rec.p2_cycles, d2[n_stats]));
        n_stats <= n_stats + 1;
      end
    end
  end

  // stats FIFO room: long full stretches
  initial begin
    forever begin
      @(posedge clk);
      if ($urandom_range(0, 99) == 0) begin
        stats_room <= 1'b0;
        repeat ($urandom_range(50, 200)) @(posedge clk);
        stats_room <= 1'b1;
      end
    end
  end

  initial begin
    wait (n_out == NTU && out_left == 0 && n_stats == NTU);
    repeat (5) @(posedge clk);
    checks += 3;
    if (tr_hold == 0) fail("transpose-full hold never happened");
    if (om_hold == 0) fail("output-full hold never happened");
    if (st_hold == 0) fail("stats-full hold never happened");
    $display("holds: transpose %0d output %0d stats %0d", tr_hold, om_hold, st_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired: %0d in, %0d P1, %0d P2, %0d out", n_in, n_p1, n_p2, n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
