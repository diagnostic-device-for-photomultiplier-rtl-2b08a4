// i2c_master: writes one data byte to an I2C device (the LED-supply DACs).
//
// A transfer is START, the 7-bit address with the write bit, the data byte
// and STOP. After each byte the master releases SDA for one clock and reads
// the acknowledge; a missing acknowledge ends the transfer with a STOP and
// raises ack_err together with done. The DACs take exactly one data byte,
// which sets their output voltage.
//
// Every bit takes four phases of QUARTER clock cycles each: SCL low while SDA
// changes, SCL released, SDA sampled with SCL high, SCL pulled low again. The
// START and STOP conditions use the same phase timing. Clock stretching by the
// device is not supported.
//
// Interface: start (one cycle, accepted when busy is low) with addr and data;
// busy is high while a transfer runs; done is a one-cycle pulse and
// ack_err is valid with it; busy is low again from that cycle on.
// scl_oe/sda_oe pull the lines low; sda_i is the level on the bus. A
// transfer takes START, 2 x 9 bits and STOP, each 4*QUARTER clock cycles.
//
// From the device paper: one byte per DAC write, the DACs controlled over I2C
// and communication errors reported. This design's own choices: the bus rate
// (100 kHz at a 400 MHz clock by default) and the phase sequencing.
module i2c_master #(
  parameter int unsigned QUARTER = 1000
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [6:0] addr,
  input  logic [7:0] data,
  output logic       busy,
  output logic       done,
  output logic       ack_err,
  output logic       scl_oe,
  output logic       sda_oe,
  input  logic       sda_i
);

  typedef enum logic [2:0] {M_IDLE, M_START, M_BIT, M_STOP, M_DONE} mstate_e;

  localparam int unsigned QW = (QUARTER > 1) ? $clog2(QUARTER) : 1;

  mstate_e       state;
  logic [QW-1:0] qcnt;
  logic          tick;
  logic [1:0]    phase;
  logic [3:0]    bitn;      // 0..7 data bits, 8 = acknowledge
  logic          byten;     // 0 = address byte, 1 = data byte
  logic [7:0]    shreg;
  logic [7:0]    data_q;
  logic          nack;

  assign tick = (qcnt == QW'(QUARTER - 1));
  assign busy = (state != M_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= M_IDLE;
      qcnt    <= '0;
      phase   <= '0;
      bitn    <= '0;
      byten   <= 1'b0;
      shreg   <= '0;
      data_q  <= '0;
      nack    <= 1'b0;
      scl_oe  <= 1'b0;
      sda_oe  <= 1'b0;
      done    <= 1'b0;
      ack_err <= 1'b0;
    end else begin
      done <= 1'b0;
      if (state == M_IDLE) qcnt <= '0;
      else                 qcnt <= tick ? '0 : qcnt + 1'b1;

      unique case (state)
        M_IDLE: begin
          scl_oe <= 1'b0;
          sda_oe <= 1'b0;
          phase  <= '0;
          if (start) begin
            shreg   <= {addr, 1'b0};
            data_q  <= data;
            byten   <= 1'b0;
            bitn    <= '0;
            nack    <= 1'b0;
            ack_err <= 1'b0;
            state   <= M_START;
          end
        end

        // Phase 0: bus idle; 1: SDA falls with SCL high; 2: SCL falls; 3: wait.
        M_START: if (tick) begin
          phase <= phase + 1'b1;
          unique case (phase)
            2'd0: sda_oe <= 1'b1;
            2'd1: scl_oe <= 1'b1;
            2'd2: ;
            2'd3: state <= M_BIT;
          endcase
        end

        M_BIT: if (tick) begin
          phase <= phase + 1'b1;
          unique case (phase)
            2'd0: sda_oe <= (bitn == 4'd8) ? 1'b0 : ~shreg[7];  // SCL is low
            2'd1: scl_oe <= 1'b0;                               // SCL rises
            2'd2: if (bitn == 4'd8) nack <= sda_i;              // sample ACK
            2'd3: begin
              scl_oe <= 1'b1;                                   // SCL falls
              if (bitn == 4'd8) begin
                bitn <= '0;
                if (nack || byten) begin
                  state <= M_STOP;
                end else begin
                  byten <= 1'b1;
                  shreg <= data_q;
                end
              end else begin
                bitn  <= bitn + 1'b1;
                shreg <= {shreg[6:0], 1'b0};
              end
            end
          endcase
        end

        // Phase 0: SDA low with SCL low; 1: SCL released; 2: SDA released (STOP).
        M_STOP: if (tick) begin
          phase <= phase + 1'b1;
          unique case (phase)
            2'd0: sda_oe <= 1'b1;
            2'd1: scl_oe <= 1'b0;
            2'd2: sda_oe <= 1'b0;
            2'd3: state  <= M_DONE;
          endcase
        end

        M_DONE: begin
          done    <= 1'b1;
          ack_err <= nack;
          state   <= M_IDLE;
        end

        default: state <= M_IDLE;
      endcase
    end
  end

endmodule
