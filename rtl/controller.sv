// controller - synchronises the processing elements and times every TU.
//
// Every memory between two processing elements is split into two halves.
// The controller keeps, for each of them, which half the producer writes
// next, which half the consumer reads next and how many halves are full:
//   input memory        : in_full[2] per half, written by transfer_input,
//                         read by the first pass (P1);
//   transpose memory[t] : tr_cnt[t] full halves, written by P1, read by P2;
//   output memory[t]    : out_cnt[t] full halves, written by P2, read by
//                         transfer_output;
// one transpose and one output memory per TU type t. A processing element
// is launched (one-clock start pulse) only when its source half is full and
// its destination half is free, and the half is handed over when the element
// reports done. TUs leave in the order they arrived: two small queues carry
// the type of every TU from P1 to P2 and from P2 to transfer_output.
//
// Timing records: a free-running 16-bit clock counter timestamps P1 and P2
// start and done. When P2 finishes a TU a stats_t record {type, P1 clocks,
// P2 clocks, P1 start to P2 done} is pushed to the stats FIFO. P2 is only
// launched while that FIFO has room, so a stalled stats reader stalls the
// pipeline instead of losing records.
//
// Start pulses and the start types/banks that go with them are
// combinational; the bank selects used while an element runs are registered.
//
// The published design has a controller process that synchronises the
// processing elements over half-buffered memories and collects per-TU
// durations for a host statistics process. The flags, queues, launch and
// stall rules and the record layout here are this design's own.
module controller
  import hevc_it_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  // transfer_input
  output logic          in_bank_free,
  output logic          in_wr_bank,
  input  logic          tu_in_done,
  input  tu_type_e      tu_in_type,
  // first 1D pass
  output logic          p1_start,
  output tu_type_e      p1_start_type,
  output logic          p1_in_bank,
  output logic          p1_tr_bank,
  output tu_type_e      p1_type,
  input  logic          p1_done,
  // second 1D pass
  output logic          p2_start,
  output tu_type_e      p2_start_type,
  output tu_type_e      p2_type,
  output logic          p2_tr_bank,
  output logic          p2_out_bank,
  input  logic          p2_done,
  // transfer_output
  output logic          out_start,
  output tu_type_e      out_start_type,
  output logic          out_start_bank,
  input  logic          out_busy,
  input  logic          out_done,
  // stats FIFO
  input  logic          stats_room,
  output logic          stats_push,
  output stats_t        stats_rec
);

  localparam int unsigned NT = 5;   // TU types

  logic [15:0] now;

  // ---- input memory halves ---------------------------------------------
  logic        in_full [2];
  tu_type_e    in_type [2];
  logic        in_rd;

  assign in_bank_free = !in_full[in_wr_bank];

  // ---- per-type transpose / output halves --------------------------------
  logic [1:0] tr_cnt  [NT];
  logic       tr_wr   [NT];
  logic       tr_rd   [NT];
  logic [1:0] out_cnt [NT];
  logic       out_wr  [NT];
  logic       out_rd  [NT];

  // ---- P1 -> P2 queue: {type, P1 clocks, P1 start time} ------------------
  typedef struct packed {
    tu_type_e    tu_type;
    logic [15:0] p1_cycles;
    logic [15:0] p1_t0;
  } q12_t;

  localparam int unsigned Q12_W = $bits(q12_t);

  logic             q12_push, q12_room, q12_valid;
  q12_t             q12_in, q12_head;
  logic [Q12_W-1:0] q12_head_bits;
  logic [4:0]       q12_count;

  sync_fifo #(.WIDTH(Q12_W), .DEPTH(16)) u_q12 (
    .clk, .rst_n,
    .in_valid(q12_push), .in_ready(q12_room), .in_data(q12_in),
    .out_valid(q12_valid), .out_ready(p2_start), .out_data(q12_head_bits),
    .count(q12_count)
  );
  assign q12_head = q12_t'(q12_head_bits);

  // ---- P2 -> output queue: TU type ---------------------------------------
  logic       q2o_push, q2o_room, q2o_valid;
  logic [2:0] q2o_head;
  logic [4:0] q2o_count;

  sync_fifo #(.WIDTH(3), .DEPTH(16)) u_q2o (
    .clk, .rst_n,
    .in_valid(q2o_push), .in_ready(q2o_room), .in_data(p2_type),
    .out_valid(q2o_valid), .out_ready(out_start), .out_data(q2o_head),
    .count(q2o_count)
  );

  // ---- launch conditions ---------------------------------------------------
  logic        p1_active, p2_active;
  logic [15:0] p1_t0, p2_t0;
  q12_t        p2_info;

  assign p1_start_type = in_type[in_rd];
  assign p1_start      = !p1_active && in_full[in_rd]
                      && (tr_cnt[p1_start_type] != 2'd2) && q12_room;

  assign p2_start_type = q12_head.tu_type;
  assign p2_start      = !p2_active && q12_valid
                      && (out_cnt[p2_start_type] != 2'd2) && q2o_room && stats_room;

  assign out_start_type = tu_type_e'(q2o_head);
  assign out_start_bank = out_rd[out_start_type];
  assign out_start      = !out_busy && q2o_valid;

  // Type of the TU transfer_output is sending, for its done.
  tu_type_e out_type_q;

  always_ff @(posedge clk) begin
    if (!rst_n)         out_type_q <= TU_DST4;
    else if (out_start) out_type_q <= out_start_type;
  end

  // ---- queue writes and the stats record ---------------------------------
  assign q12_push = p1_done;
  assign q12_in   = '{tu_type: p1_type, p1_cycles: now - p1_t0, p1_t0: p1_t0};
  assign q2o_push = p2_done;

  assign stats_push = p2_done;
  assign stats_rec  = '{tu_type:      p2_info.tu_type,
                        p1_cycles:    p2_info.p1_cycles,
                        p2_cycles:    now - p2_t0,
                        total_cycles: now - p2_info.p1_t0};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      now         <= '0;
      in_full     <= '{default: 1'b0};
      in_type     <= '{default: TU_DST4};
      in_wr_bank  <= 1'b0;
      in_rd       <= 1'b0;
      tr_cnt      <= '{default: 2'd0};
      tr_wr       <= '{default: 1'b0};
      tr_rd       <= '{default: 1'b0};
      out_cnt     <= '{default: 2'd0};
      out_wr      <= '{default: 1'b0};
      out_rd      <= '{default: 1'b0};
      p1_active   <= 1'b0;
      p2_active   <= 1'b0;
      p1_type     <= TU_DST4;
      p2_type     <= TU_DST4;
      p1_in_bank  <= 1'b0;
      p1_tr_bank  <= 1'b0;
      p2_tr_bank  <= 1'b0;
      p2_out_bank <= 1'b0;
      p1_t0       <= '0;
      p2_t0       <= '0;
      p2_info     <= '0;
    end else begin
      now <= now + 16'd1;

      // transfer_input filled a half
      if (tu_in_done) begin
        in_full[in_wr_bank] <= 1'b1;
        in_type[in_wr_bank] <= tu_in_type;
        in_wr_bank          <= !in_wr_bank;
      end

      // P1 launch / completion
      if (p1_start) begin
        p1_active  <= 1'b1;
        p1_type    <= p1_start_type;
        p1_in_bank <= in_rd;
        p1_tr_bank <= tr_wr[p1_start_type];
        p1_t0      <= now;
      end
      if (p1_done) begin
        p1_active       <= 1'b0;
        in_full[in_rd]  <= 1'b0;
        in_rd           <= !in_rd;
        tr_wr[p1_type]  <= !tr_wr[p1_type];
      end

      // P2 launch / completion
      if (p2_start) begin
        p2_active   <= 1'b1;
        p2_type     <= p2_start_type;
        p2_tr_bank  <= tr_rd[p2_start_type];
        p2_out_bank <= out_wr[p2_start_type];
        p2_t0       <= now;
        p2_info     <= q12_head;
      end
      if (p2_done) begin
        p2_active       <= 1'b0;
        tr_rd[p2_type]  <= !tr_rd[p2_type];
        out_wr[p2_type] <= !out_wr[p2_type];
      end

      // transfer_output completion
      if (out_start)
        out_rd[out_start_type] <= !out_rd[out_start_type];

      // full-half counters: one increment and one decrement per clock at most
      for (int t = 0; t < int'(NT); t++) begin
        tr_cnt[t]  <= tr_cnt[t]
                    + 2'(p1_done && (p1_type == tu_type_e'(t)))
                    - 2'(p2_done && (p2_type == tu_type_e'(t)));
        out_cnt[t] <= out_cnt[t]
                    + 2'(p2_done && (p2_type == tu_type_e'(t)))
                    - 2'(out_done && (out_type_q == tu_type_e'(t)));
      end
    end
  end

  // A half is never over-filled.
  for (genvar t = 0; t < NT; t++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n) tr_cnt[t] <= 2'd2 && out_cnt[t] <= 2'd2);
  end
  assert property (@(posedge clk) disable iff (!rst_n) tu_in_done |-> !in_full[in_wr_bank]);

endmodule
