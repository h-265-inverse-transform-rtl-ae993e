// transfer_input - moves one TU from the coefficient stream into the input memory.
//
// Stream format: a header word whose bits 2:0 give the TU type (see
// hevc_it_pkg::tu_type_e), followed by the N*N coefficients of the TU in
// row-major order, each in bits 15:0 of a word. The block writes coefficient
// (row, col) to the input-memory half named by `bank`.
//
// Flow control: the header is taken only while the controller reports the
// current half free (bank_free); the coefficient words are then taken one
// per clock as they arrive. tu_done pulses in the clock of the last write,
// together with tu_type, so the controller marks the half full and switches
// halves at the same clock edge as the last write.
//
// A process that moves the coefficient stream into the input memory follows
// the published design; the header-word framing and the handshake with the
// controller are this design's own.
module transfer_input
  import hevc_it_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [31:0] in_data,
  input  logic        bank_free,
  output logic        mem_we,
  output logic [4:0]  mem_row,
  output logic [4:0]  mem_col,
  output sample_t     mem_wdata,
  output logic        tu_done,
  output tu_type_e    tu_type
);

  typedef enum logic { S_HEADER, S_DATA } state_e;

  state_e     state;
  logic [5:0] size_q;
  logic [4:0] row, col;
  logic       last;

  assign in_ready  = (state == S_HEADER) ? bank_free : 1'b1;
  assign mem_we    = (state == S_DATA) && in_valid;
  assign mem_row   = row;
  assign mem_col   = col;
  assign mem_wdata = sample_t'(in_data[15:0]);
  assign last      = (6'(row) == size_q - 6'd1) && (6'(col) == size_q - 6'd1);
  assign tu_done   = mem_we && last;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= S_HEADER;
      tu_type <= TU_DST4;
      size_q  <= 6'd4;
      row     <= '0;
      col     <= '0;
    end else if (state == S_HEADER) begin
      if (in_valid && bank_free) begin
        tu_type <= decode_type(in_data[2:0]);
        size_q  <= 6'(tu_size(decode_type(in_data[2:0])));
        row     <= '0;
        col     <= '0;
        state   <= S_DATA;
      end
    end else if (mem_we) begin
      if (last) begin
        state <= S_HEADER;
      end else if (6'(col) == size_q - 6'd1) begin
        col <= '0;
        row <= row + 5'd1;
      end else begin
        col <= col + 5'd1;
      end
    end
  end

endmodule
