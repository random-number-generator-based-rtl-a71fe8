// uart_tx: RS-232 transmitter for the random bytes.
//
// Frame: one start bit (0), eight data bits with bit 0 first, no parity, one
// stop bit (1), each CLKS_PER_BIT clocks long (434 clocks = 115200 baud at
// 50 MHz), so a frame takes 10 * 434 = 4340 clocks. A transmit pulse while
// the transmitter is idle latches data and starts a frame; the line goes low
// on the next clock edge. A transmit pulse during a frame is ignored, so the
// byte it offered is dropped: the random bits arrive far faster than the
// line can carry them, and only bytes that find the line idle are sent.
//
// active is high for the whole frame. done goes high when a frame's stop bit
// has been sent and stays high until the next frame starts, so that both can
// drive LEDs. The frame format, the baud rate, and the Clk / Transmit /
// Data Bus(7:0) inputs with Active / Serial Out / Done outputs follow the
// design's description; dropping requests while busy and the meaning of done
// as a level are this design's own choices.
//
// Interface: clk, rst (synchronous, active high), transmit, data[7:0], tx
// (serial line, idles high), active, done.
module uart_tx #(
  parameter int unsigned CLKS_PER_BIT = trng_pkg::CLKS_PER_BIT,
  parameter int unsigned DATA_BITS    = trng_pkg::DATA_BITS
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 transmit,
  input  logic [DATA_BITS-1:0] data,
  output logic                 tx,
  output logic                 active,
  output logic                 done
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned BW = $clog2(DATA_BITS);

  trng_pkg::tx_state_e  state;
  logic [DATA_BITS-1:0] shreg;
  logic [BW-1:0]        bit_idx;
  logic                 tick;

  baud_generator #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_baud (
    .clk  (clk),
    .rst  (rst),
    .clear(state == trng_pkg::TX_IDLE),
    .tick (tick)
  );

  assign active = (state != trng_pkg::TX_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= trng_pkg::TX_IDLE;
      shreg   <= '0;
      bit_idx <= '0;
      tx      <= 1'b1;
      done    <= 1'b0;
    end else begin
      unique case (state)
        trng_pkg::TX_IDLE: begin
          tx <= 1'b1;
          if (transmit) begin
            shreg   <= data;
            bit_idx <= '0;
            tx      <= 1'b0;
            done    <= 1'b0;
            state   <= trng_pkg::TX_START;
          end
        end
        trng_pkg::TX_START: begin
          if (tick) begin
            tx    <= shreg[0];
            shreg <= shreg >> 1;
            state <= trng_pkg::TX_DATA;
          end
        end
        trng_pkg::TX_DATA: begin
          if (tick) begin
            if (bit_idx == BW'(DATA_BITS - 1)) begin
              tx    <= 1'b1;
              state <= trng_pkg::TX_STOP;
            end else begin
              tx      <= shreg[0];
              shreg   <= shreg >> 1;
              bit_idx <= bit_idx + 1'b1;
            end
          end
        end
        trng_pkg::TX_STOP: begin
          if (tick) begin
            done  <= 1'b1;
            state <= trng_pkg::TX_IDLE;
          end
        end
        default: state <= trng_pkg::TX_IDLE;
      endcase
    end
  end

  // The line is high whenever no frame is in progress.
  a_idle_high: assert property (@(posedge clk) disable iff (rst)
                                (state == trng_pkg::TX_IDLE) |-> tx);
  // The stop bit is always high.
  a_stop_high: assert property (@(posedge clk) disable iff (rst)
                                (state == trng_pkg::TX_STOP) |-> tx);
endmodule
