// uart: asynchronous serial port for manual control from a PC.
//
// Frames are 8N1: a low start bit, eight data bits LSB first and a high stop
// bit, each CLKS_PER_BIT clock cycles long. The receiver synchronizes its
// input with two flip-flops, waits half a bit after the falling edge of the
// start bit, checks that the line is still low, then samples each data bit in
// its middle and accepts the byte only if the stop bit is high. The
// transmitter sends one frame per tx_start.
//
// Interface: rx_valid is a one-cycle pulse with rx_data, issued in the middle
// of the stop bit. tx_start with tx_data starts a frame at once when the
// transmitter is idle; during a frame one further byte is held and sent
// next (a byte offered while one is already held replaces it). tx_busy is
// high while a frame is sent or a byte is held; a frame lasts ten bit times.
// soft_rst returns the receiver to idle (used by the command timeout).
//
// From the device paper: a UART used for control from a PC through a USB/UART
// converter. This design's own choices: the frame format and the baud rate
// (115200 baud at a 400 MHz clock by default).
module uart #(
  parameter int unsigned CLKS_PER_BIT = 3472
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       soft_rst,
  input  logic       rx_i,
  output logic       rx_valid,
  output logic [7:0] rx_data,
  input  logic       tx_start,
  input  logic [7:0] tx_data,
  output logic       tx_busy,
  output logic       tx_o
);

  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  typedef enum logic [1:0] {R_IDLE, R_START, R_DATA, R_STOP} rstate_e;

  // ---------------- receiver ----------------
  rstate_e       rstate;
  logic [1:0]    rx_sync;
  logic [CW-1:0] rcnt;
  logic [2:0]    rbit;
  logic [7:0]    rshift;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rx_sync <= 2'b11;
    else        rx_sync <= {rx_sync[0], rx_i};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rstate   <= R_IDLE;
      rcnt     <= '0;
      rbit     <= '0;
      rshift   <= '0;
      rx_valid <= 1'b0;
      rx_data  <= '0;
    end else begin
      rx_valid <= 1'b0;
      if (soft_rst) begin
        rstate <= R_IDLE;
      end else begin
        unique case (rstate)
          R_IDLE: if (!rx_sync[1]) begin
            rcnt   <= '0;
            rstate <= R_START;
          end
          R_START: begin
            if (rcnt == CW'(CLKS_PER_BIT / 2 - 1)) begin
              rcnt   <= '0;
              rbit   <= '0;
              rstate <= rx_sync[1] ? R_IDLE : R_DATA;   // glitch: back to idle
            end else begin
              rcnt <= rcnt + 1'b1;
            end
          end
          R_DATA: begin
            if (rcnt == CW'(CLKS_PER_BIT - 1)) begin
              rcnt   <= '0;
              rshift <= {rx_sync[1], rshift[7:1]};
              rbit   <= rbit + 1'b1;
              if (rbit == 3'd7) rstate <= R_STOP;
            end else begin
              rcnt <= rcnt + 1'b1;
            end
          end
          R_STOP: begin
            if (rcnt == CW'(CLKS_PER_BIT - 1)) begin
              rcnt   <= '0;
              rstate <= R_IDLE;
              if (rx_sync[1]) begin
                rx_valid <= 1'b1;
                rx_data  <= rshift;
              end
            end else begin
              rcnt <= rcnt + 1'b1;
            end
          end
          default: rstate <= R_IDLE;
        endcase
      end
    end
  end

  // ---------------- transmitter ----------------
  // A byte offered while a frame is going out waits in a one-byte holding
  // register, so back-to-back answers are not lost.
  logic [CW-1:0] tcnt;
  logic [3:0]    tbit;      // 0 start, 1..8 data, 9 stop
  logic [8:0]    tshift;    // stop bit and data bits still to send
  logic          hold_valid;
  logic [7:0]    hold_data;
  logic          tx_active;

  assign tx_busy = tx_active | hold_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_active  <= 1'b0;
      hold_valid <= 1'b0;
      hold_data  <= '0;
      tcnt       <= '0;
      tbit       <= '0;
      tshift     <= '1;
      tx_o       <= 1'b1;
    end else begin
      if (!tx_active) begin
        tx_o <= 1'b1;
        if (hold_valid || tx_start) begin
          tx_active <= 1'b1;
          tshift    <= {1'b1, hold_valid ? hold_data : tx_data};
          tcnt      <= '0;
          tbit      <= '0;
          tx_o      <= 1'b0;
        end
        // The held byte goes first; a new byte in the same cycle is held.
        hold_valid <= hold_valid && tx_start;
        if (hold_valid && tx_start) hold_data <= tx_data;
      end else begin
        if (tx_start) begin
          hold_valid <= 1'b1;
          hold_data  <= tx_data;
        end
        if (tcnt == CW'(CLKS_PER_BIT - 1)) begin
          tcnt <= '0;
          if (tbit == 4'd9) begin
            tx_active <= 1'b0;
            tx_o      <= 1'b1;
          end else begin
            tbit   <= tbit + 1'b1;
            tshift <= {1'b1, tshift[8:1]};
            tx_o   <= tshift[0];
          end
        end else begin
          tcnt <= tcnt + 1'b1;
        end
      end
    end
  end

endmodule
