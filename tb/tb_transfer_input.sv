// tb_transfer_input - checks the coefficient-stream to input-memory transfer.
//
// TUs of every type are sent with random gaps. Each memory write must carry
// the next coefficient at its (row, column) in row-major order; tu_done must
// pulse with the right type exactly at the last write of a TU; and while
// bank_free is low no header may be taken.
module tb_transfer_input;
  import hevc_it_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        in_valid = 1'b0;
  logic        in_ready;
  logic [31:0] in_data = '0;
  logic        bank_free = 1'b1;
  logic        mem_we, tu_done;
  logic [4:0]  mem_row, mem_col;
  sample_t     mem_wdata;
  tu_type_e    tu_type;
  int checks = 0;
  int failures = 0;
  int held = 0;
  int wr_checks = 0;

  always #5 clk = ~clk;

  transfer_input dut (.*);

  // expected writes: {type, row, col, data, last}
  typedef struct { int t; int r; int c; int d; bit last; } wr_t;
  wr_t exp_q [$];
  int  tus_done = 0;

  always_ff @(posedge clk) begin
    if (rst_n) begin
      if (in_valid && in_ready && !bank_free && dut.state == 1'b0) begin
        failures <= failures + 1;
        $display("header taken while no half was free");
      end
      if (in_valid && !in_ready && !bank_free) held <= held + 1;
      if (mem_we) begin
        wr_checks <= wr_checks + 1;
        if (exp_q.size() == 0 || int'(mem_row) != exp_q[0].r || int'(mem_col) != exp_q[0].c
            || int'(mem_wdata) != exp_q[0].d || tu_done != exp_q[0].last
            || (tu_done && int'(tu_type) != exp_q[0].t)) begin
          failures <= failures + 1;
          $display("write r%0d c%0d d%0d done%0d", mem_row, mem_col, mem_wdata, tu_done);
        end
        if (exp_q.size() > 0) void'(exp_q.pop_front());
      end else if (tu_done) begin
        failures <= failures + 1;
        $display("tu_done without a write");
      end
      if (tu_done) tus_done <= tus_done + 1;
    end
  end

  task automatic send_word(logic [31:0] w);
    while ($urandom_range(0, 3) == 0) @(negedge clk);
    in_valid = 1'b1;
    in_data  = w;
    while (!in_ready) @(negedge clk);
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  // bank_free drops for a while now and then (changed at the rising edge,
  // so it is stable when the sender looks at in_ready)
  initial begin
    forever begin
      @(posedge clk);
      if ($urandom_range(0, 49) == 0) begin
        bank_free <= 1'b0;
        repeat (20) @(posedge clk);
        bank_free <= 1'b1;
      end
    end
  end

  initial begin
    int n, v;
    tu_type_e t;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 12; i++) begin
      t = tu_type_e'(i % 5);
      n = int'(tu_size(t));
      send_word({16'hABC0, 13'd0, 3'(t)});     // upper bits are ignored
      for (int r = 0; r < n; r++)
        for (int c = 0; c < n; c++) begin
          v = int'($urandom_range(0, 65535)) - 32768;
          exp_q.push_back('{t: int'(t), r: r, c: c, d: v, last: (r == n - 1 && c == n - 1)});
          send_word({16'h5555, 16'(v)});
        end
    end
    repeat (5) @(negedge clk);
    checks += wr_checks + 2;
    if (tus_done != 12 || exp_q.size() != 0) begin
      failures++;
      $display("%0d TUs done, %0d writes missing", tus_done, exp_q.size());
    end
    if (held == 0) begin
      failures++;
      $display("header hold-off never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
