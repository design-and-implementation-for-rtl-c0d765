// Serial-to-parallel converter.
//
// Turns the decoded bit stream into parallel words. The link carries the
// words in UART frames, as the stimulator's serial protocol: a start bit
// (0), DATA_BITS data bits with the least significant first, and a stop
// bit (1); the line idles at 1 between frames. The converter waits for a
// start bit, shifts the data bits into a register and checks the stop bit.
// A good frame gives a one-cycle byte_valid_o with the word on byte_o; a
// frame whose stop bit is 0 is dropped with a one-cycle frame_err_o. When
// the decoder loses lock the converter returns to waiting for a start bit.
//
// Timing: byte_valid_o is high the clock after the stop bit's strobe.
// The UART framing follows the published link; the error handling is this
// design's choice.
module serial_to_parallel #(
  parameter int unsigned DATA_BITS = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 bit_valid_i,
  input  logic                 bit_i,
  input  logic                 locked_i,
  output logic                 byte_valid_o,
  output logic [DATA_BITS-1:0] byte_o,
  output logic                 frame_err_o
);

  typedef enum logic [1:0] {S_IDLE, S_DATA, S_STOP} state_t;

  localparam int unsigned NW = $clog2(DATA_BITS + 1);

  state_t               state;
  logic [NW-1:0]        nbits;
  logic [DATA_BITS-1:0] shreg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      nbits        <= '0;
      shreg        <= '0;
      byte_o       <= '0;
      byte_valid_o <= 1'b0;
      frame_err_o  <= 1'b0;
    end else begin
      byte_valid_o <= 1'b0;
      frame_err_o  <= 1'b0;
      if (!locked_i) begin
        state <= S_IDLE;
      end else if (bit_valid_i) begin
        unique case (state)
          S_IDLE: if (!bit_i) begin
            state <= S_DATA;
            nbits <= '0;
          end
          S_DATA: begin
            shreg <= {bit_i, shreg[DATA_BITS-1:1]};
            nbits <= nbits + 1'b1;
            if (nbits == NW'(DATA_BITS - 1)) state <= S_STOP;
          end
          S_STOP: begin
            state <= S_IDLE;
            if (bit_i) begin
              byte_o       <= shreg;
              byte_valid_o <= 1'b1;
            end else begin
              frame_err_o  <= 1'b1;
            end
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end

endmodule
