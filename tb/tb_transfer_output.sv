// tb_transfer_output - checks the output-memory to residual-stream transfer.
//
// A behavioural output memory (one-clock read latency) holds a known block
// per (type, half), and a behavioural 8-word FIFO takes the pushed words;
// its reader stalls at random, so `space` often sits at 0 or 1.
// The pushed words must be the header and then the residuals row-major,
// sign-extended; no word may be pushed without room; done must pulse once
// per TU; with room always available a TU must take N*N + 3 clocks.
module tb_transfer_output;
  import hevc_it_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        start = 1'b0;
  tu_type_e    start_type = TU_DST4;
  logic        start_bank = 1'b0;
  logic        busy, done, rd_bank, rd_en, push;
  tu_type_e    rd_type;
  logic [4:0]  rd_row, rd_col;
  sample_t     rd_data;
  logic [7:0]  space;
  logic [31:0] push_data;
  int checks = 0;
  int failures = 0;
  int dones = 0;
  int occ = 0;          // words in the modelled FIFO
  bit drain_fast = 1'b1;
  int no_room = 0;

  // modelled FIFO: pushes add a word, the reader removes one at random
  always_ff @(posedge clk) begin
    automatic bit pop = (occ > 0) && (drain_fast || $urandom_range(0, 3) == 0);
    occ <= occ + int'(push) - int'(pop);
    if (space == 0) no_room <= no_room + 1;
  end
  assign space = 8'(8 - occ);

  always #5 clk = ~clk;

  transfer_output dut (.*);

  function automatic int val(int t, int b, int r, int c);
    return ((t * 7 + b * 3 + r * 37 + c * 11) % 4001) - 2000;
  endfunction

  always_ff @(posedge clk)
    if (rd_en) rd_data <= sample_t'(val(int'(rd_type), int'(rd_bank), int'(rd_row), int'(rd_col)));

  logic [31:0] exp_q [$];

  always_ff @(posedge clk) begin
    if (rst_n) begin
      if (push) begin
        checks <= checks + 1;
        if (space == 0) begin
          failures <= failures + 1;
          $display("push with no room");
        end
        if (exp_q.size() == 0 || push_data != exp_q[0]) begin
          failures <= failures + 1;
          $display("pushed %h, expected %h", push_data, exp_q.size() ? exp_q[0] : 32'hx);
        end
        if (exp_q.size() > 0) void'(exp_q.pop_front());
      end
      if (done) dones <= dones + 1;
    end
  end

  task automatic send_tu(tu_type_e t, bit b, bit full_room);
    int n = int'(tu_size(t));
    int t0;
    exp_q.push_back({29'd0, t});
    for (int r = 0; r < n; r++)
      for (int c = 0; c < n; c++) exp_q.push_back(32'(val(int'(t), int'(b), r, c)));
    @(negedge clk);
    start = 1'b1; start_type = t; start_bank = b;
    t0 = $time;
    @(negedge clk);
    start = 1'b0;
    drain_fast = full_room;
    while (!done) @(negedge clk);
    if (full_room) begin
      checks++;
      if (($time - t0) / 10 != n * n + 3) begin
        failures++;
        $display("type %0d took %0d clocks, expected %0d", t, ($time - t0) / 10, n * n + 3);
      end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 10; i++) send_tu(tu_type_e'(i % 5), i[1], 1'b1);
    for (int i = 0; i < 10; i++) send_tu(tu_type_e'(i % 5), i[0], 1'b0);
    repeat (3) @(negedge clk);
    checks += 3;
    if (dones != 20 || exp_q.size() != 0) begin
      failures++;
      $display("%0d done pulses, %0d words missing", dones, exp_q.size());
    end
    if (no_room == 0) begin
      failures++;
      $display("the FIFO never filled");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
