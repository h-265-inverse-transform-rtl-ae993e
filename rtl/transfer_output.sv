// transfer_output - sends one finished TU from an output memory to the residual stream.
//
// On `start` it takes the TU type and the output-memory half to read, pushes
// a header word (TU type in bits 2:0) into the output FIFO and then the N*N
// residuals in row-major order, each sign-extended to 32 bits. The output
// memory has a one-clock read latency, so a read is issued only when the
// FIFO has room for it and for the word already in flight (`space` is the
// FIFO's free-slot count). `done` pulses for one clock after the last word
// is pushed; busy drops in the same clock. With a FIFO that never fills,
// a TU takes N*N + 3 clocks from start to done.
//
// A process that moves the residuals from the output memory to the host
// stream follows the published design; the header word and the room-based
// flow control are this design's own.
module transfer_output
  import hevc_it_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  tu_type_e    start_type,
  input  logic        start_bank,
  output logic        busy,
  output logic        done,
  output tu_type_e    rd_type,
  output logic        rd_bank,
  output logic        rd_en,
  output logic [4:0]  rd_row,
  output logic [4:0]  rd_col,
  input  sample_t     rd_data,
  input  logic [7:0]  space,
  output logic        push,
  output logic [31:0] push_data
);

  typedef enum logic [1:0] { S_IDLE, S_HEADER, S_DATA, S_DRAIN } state_e;

  state_e     state;
  logic [5:0] size_q;
  logic [4:0] row, col;
  logic       inflight;     // a read was issued last clock, its word is pushed now
  logic       last;

  assign busy      = (state != S_IDLE);
  assign rd_row    = row;
  assign rd_col    = col;
  assign rd_en     = (state == S_DATA) && (space > 8'(inflight));
  assign last      = (6'(row) == size_q - 6'd1) && (6'(col) == size_q - 6'd1);
  assign push      = inflight || ((state == S_HEADER) && (space != '0));
  assign push_data = inflight ? 32'(signed'(rd_data)) : {29'd0, rd_type};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      rd_type  <= TU_DST4;
      rd_bank  <= 1'b0;
      size_q   <= 6'd4;
      row      <= '0;
      col      <= '0;
      inflight <= 1'b0;
      done     <= 1'b0;
    end else begin
      inflight <= rd_en;
      done     <= 1'b0;
      case (state)
        S_IDLE:
          if (start) begin
            rd_type <= start_type;
            rd_bank <= start_bank;
            size_q  <= 6'(tu_size(start_type));
            row     <= '0;
            col     <= '0;
            state   <= S_HEADER;
          end
        S_HEADER:
          if (space != '0) state <= S_DATA;
        S_DATA:
          if (rd_en) begin
            if (last) begin
              state <= S_DRAIN;
            end else if (6'(col) == size_q - 6'd1) begin
              col <= '0;
              row <= row + 5'd1;
            end else begin
              col <= col + 5'd1;
            end
          end
        default: begin   // S_DRAIN: the last word is pushed this clock
          state <= S_IDLE;
          done  <= 1'b1;
        end
      endcase
    end
  end

endmodule
