// comm_handler: command decoder and register file of the diagnostic device.
//
// Commands arrive as bytes. A command byte with bit 7 set reads the register
// given by bits 2:0; the handler answers with one byte on resp. A command
// byte with bit 7 clear announces a write to that register, and the next byte
// is the value. Once the command byte of a write has arrived a timeout
// counter runs; if the data byte does not follow within TIMEOUT_CYCLES the
// command is dropped and timeout_o pulses, which also resets the receiving
// link. A frame start (new I2C transfer or change of link) abandons a
// half-received command.
//
// Registers (see pdd_pkg): status, reload high and low byte, compare, and
// the four DAC values. All written values read back as written, so the
// master can confirm what was received. The 16-bit reload is passed to the
// PWM generator when its low byte is written; a value below RELOAD_MIN is
// refused (the generator keeps its rate) and the sticky RELOAD_REJ status bit
// is set. This is one of the places that limit the pulse rate; the PWM
// generator clamps as well. A compare write goes straight to the generator's
// buffer register. A DAC write marks that DAC pending; whenever the I2C master
// is free, the lowest pending DAC is written. A DAC that does not acknowledge
// sets its sticky error bit. Writing 1 to a sticky status bit clears it; the
// BUSY bit is high while the I2C master works or a DAC write waits.
//
// Timing: rx bytes are taken in the cycle they arrive; resp and the write
// strobes follow one cycle later.
//
// From the device paper: eight registers (PWM control, four 8-bit DACs, status),
// read-back of written data, the status bits for DAC errors and a busy DAC
// bus, the minimum reload, and the timeout after the first command byte.
// This design's own choices: the command and register encoding, the
// reload commit on the low byte, the write queue for the DACs and the timeout
// length (1 ms at 400 MHz by default).
module comm_handler
  import pdd_pkg::*;
#(
  parameter int unsigned TIMEOUT_CYCLES = 400_000,
  parameter logic [15:0] RELOAD_MIN     = 16'd3999,
  parameter logic [15:0] RELOAD_RESET   = 16'hFFFF
) (
  input  logic        clk,
  input  logic        rst_n,
  input  byte_beat_t  rx,
  input  logic        frame_start,
  output byte_beat_t  resp,
  output logic        timeout_o,
  // to the PWM generator
  output logic        pwm_reload_wr,
  output logic [15:0] pwm_reload,
  output logic        pwm_compare_wr,
  output logic [7:0]  pwm_compare,
  // to the I2C master and mux
  output logic        dac_start,
  output logic [1:0]  dac_ch,
  output logic [7:0]  dac_value,
  input  logic        dac_done,
  input  logic        dac_ack_err,
  output logic [7:0]  status_o
);

  localparam int unsigned TW = $clog2(TIMEOUT_CYCLES + 1);

  typedef enum logic {H_CMD, H_DATA} hstate_e;

  hstate_e         state, state_eff;
  reg_addr_e       wr_addr;
  logic [TW-1:0]   tcnt;
  logic [7:0]      reload_hi, reload_lo, compare;
  logic [7:0]      dac_val [NUM_DAC];
  logic [NUM_DAC-1:0] pending, dac_err;
  logic            reload_rej, in_flight;
  logic [7:0]      status;
  logic [7:0]      rd_val;
  reg_addr_e       rd_addr;

  always_comb begin
    status = '0;
    status[ST_DAC_ERR_LSB +: NUM_DAC] = dac_err;
    status[ST_BUSY]                   = in_flight | (|pending);
    status[ST_RELOAD_REJ]             = reload_rej;
  end
  assign status_o = status;

  // A frame start in the same cycle as a byte makes that byte a command.
  assign state_eff = frame_start ? H_CMD : state;
  assign rd_addr   = reg_addr_e'(rx.data[2:0]);

  always_comb begin
    unique case (rd_addr)
      REG_STATUS:    rd_val = status;
      REG_RELOAD_HI: rd_val = reload_hi;
      REG_RELOAD_LO: rd_val = reload_lo;
      REG_COMPARE:   rd_val = compare;
      REG_DAC0:      rd_val = dac_val[0];
      REG_DAC1:      rd_val = dac_val[1];
      REG_DAC2:      rd_val = dac_val[2];
      REG_DAC3:      rd_val = dac_val[3];
      default:       rd_val = '0;
    endcase
  end

  // Command decoding and register writes.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state          <= H_CMD;
      wr_addr        <= REG_STATUS;
      tcnt           <= '0;
      resp           <= '0;
      timeout_o      <= 1'b0;
      reload_hi      <= RELOAD_RESET[15:8];
      reload_lo      <= RELOAD_RESET[7:0];
      compare        <= '0;
      dac_val        <= '{default: '0};
      reload_rej     <= 1'b0;
      pwm_reload_wr  <= 1'b0;
      pwm_reload     <= RELOAD_RESET;
      pwm_compare_wr <= 1'b0;
      pwm_compare    <= '0;
    end else begin
      resp.valid     <= 1'b0;
      timeout_o      <= 1'b0;
      pwm_reload_wr  <= 1'b0;
      pwm_compare_wr <= 1'b0;

      if (rx.valid && state_eff == H_CMD) begin
        if (rx.data[CMD_READ_BIT]) begin
          resp  <= '{valid: 1'b1, data: rd_val};
          state <= H_CMD;
        end else begin
          wr_addr <= rd_addr;
          tcnt    <= '0;
          state   <= H_DATA;
        end
      end else if (rx.valid) begin          // data byte of a write
        state <= H_CMD;
        unique case (wr_addr)
          REG_STATUS: begin
            if (rx.data[ST_RELOAD_REJ]) reload_rej <= 1'b0;
          end
          REG_RELOAD_HI: reload_hi <= rx.data;
          REG_RELOAD_LO: begin
            reload_lo <= rx.data;
            if ({reload_hi, rx.data} >= RELOAD_MIN) begin
              pwm_reload_wr <= 1'b1;
              pwm_reload    <= {reload_hi, rx.data};
            end else begin
              reload_rej    <= 1'b1;
            end
          end
          REG_COMPARE: begin
            compare        <= rx.data;
            pwm_compare_wr <= 1'b1;
            pwm_compare    <= rx.data;
          end
          default: dac_val[wr_addr[1:0]] <= rx.data;   // REG_DAC0..3
        endcase
      end else if (state_eff == H_DATA) begin
        if (tcnt == TW'(TIMEOUT_CYCLES - 1)) begin
          timeout_o <= 1'b1;
          state     <= H_CMD;
        end else begin
          tcnt  <= tcnt + 1'b1;
          state <= H_DATA;
        end
      end else begin
        state <= H_CMD;
      end
    end
  end

  // DAC write queue and error flags.
  logic            dac_wr;
  logic [1:0]      launch_ch;
  logic            launch;
  logic [1:0]      active_ch;

  assign dac_wr = rx.valid && state_eff == H_DATA && wr_addr[2];

  always_comb begin
    launch_ch = '0;
    for (int i = NUM_DAC - 1; i >= 0; i--) if (pending[i]) launch_ch = 2'(i);
    launch = !in_flight && (|pending);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending   <= '0;
      dac_err   <= '0;
      in_flight <= 1'b0;
      active_ch <= '0;
      dac_start <= 1'b0;
      dac_ch    <= '0;
      dac_value <= '0;
    end else begin
      dac_start <= 1'b0;
      if (launch) begin
        pending[launch_ch] <= 1'b0;
        in_flight          <= 1'b1;
        active_ch          <= launch_ch;
        dac_start          <= 1'b1;
        dac_ch             <= launch_ch;
        dac_value          <= dac_val[launch_ch];
      end
      if (dac_done) begin
        in_flight <= 1'b0;
        if (dac_ack_err) dac_err[active_ch] <= 1'b1;
      end
      // A new write after the launch queues the DAC again.
      if (dac_wr) pending[wr_addr[1:0]] <= 1'b1;
      if (rx.valid && state_eff == H_DATA && wr_addr == REG_STATUS)
        dac_err <= dac_err & ~rx.data[ST_DAC_ERR_LSB +: NUM_DAC];
    end
  end

endmodule
