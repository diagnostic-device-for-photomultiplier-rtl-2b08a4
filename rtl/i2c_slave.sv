// i2c_slave: register-access port for the TDC (or a test computer).
//
// SCL and SDA are brought into the clock domain by two flip-flops; START and
// STOP are recognised as SDA edges while SCL is high. After START the slave
// shifts in the address byte on SCL rising edges. If the address matches
// SLAVE_ADDR it acknowledges. In a write transfer every following byte is
// acknowledged and handed on as rx; frame_start marks the start of a write
// transfer so that the next byte is taken as a command. In a read transfer
// the slave sends the byte last loaded through tx_load (the answer to the
// last read command), and sends it again for every byte the master
// acknowledges. SDA is only changed while SCL is low.
//
// Interface: scl_i/sda_i are the bus levels, sda_oe pulls SDA low (open
// drain; the slave never stretches SCL). rx_valid/frame_start are one-cycle
// pulses, issued in the clock after the SCL falling edge that ends the byte
// or address. soft_rst returns the protocol engine to idle (used by the
// command timeout). The clock must be many times faster than SCL.
//
// From the device paper: the I2C slave role and the register read-back. This
// design's own choices: the slave address, the read protocol and the
// synchronizer.
module i2c_slave #(
  parameter logic [6:0] SLAVE_ADDR = 7'h50
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       soft_rst,
  input  logic       scl_i,
  input  logic       sda_i,
  output logic       sda_oe,
  output logic       rx_valid,
  output logic [7:0] rx_data,
  output logic       frame_start,
  input  logic       tx_load,
  input  logic [7:0] tx_data
);

  typedef enum logic [2:0] {S_IDLE, S_ADDR, S_ACK_ADDR, S_WRITE, S_ACK_DATA, S_READ, S_READ_ACK}
    sstate_e;

  sstate_e    state;
  logic [1:0] scl_sync, sda_sync;
  logic       scl_q, sda_q;
  logic       scl_rise, scl_fall, start_c, stop_c;
  logic [3:0] bitn;       // rising SCL edges counted in a byte
  logic [7:0] shreg;
  logic [7:0] tx_hold;
  logic       rw;
  logic       master_ack;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scl_sync <= 2'b11;
      sda_sync <= 2'b11;
      scl_q    <= 1'b1;
      sda_q    <= 1'b1;
    end else begin
      scl_sync <= {scl_sync[0], scl_i};
      sda_sync <= {sda_sync[0], sda_i};
      scl_q    <= scl_sync[1];
      sda_q    <= sda_sync[1];
    end
  end

  assign scl_rise = scl_sync[1] & ~scl_q;
  assign scl_fall = ~scl_sync[1] & scl_q;
  assign start_c  = scl_sync[1] & scl_q & sda_q & ~sda_sync[1];
  assign stop_c   = scl_sync[1] & scl_q & ~sda_q & sda_sync[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) tx_hold <= '0;
    else if (tx_load) tx_hold <= tx_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      bitn        <= '0;
      shreg       <= '0;
      rw          <= 1'b0;
      master_ack  <= 1'b0;
      sda_oe      <= 1'b0;
      rx_valid    <= 1'b0;
      rx_data     <= '0;
      frame_start <= 1'b0;
    end else begin
      rx_valid    <= 1'b0;
      frame_start <= 1'b0;
      if (soft_rst || stop_c) begin
        state  <= S_IDLE;
        sda_oe <= 1'b0;
      end else if (start_c) begin
        state  <= S_ADDR;
        bitn   <= '0;
        sda_oe <= 1'b0;
      end else begin
        unique case (state)
          S_IDLE: ;

          S_ADDR, S_WRITE: begin
            if (scl_rise) begin
              shreg <= {shreg[6:0], sda_sync[1]};
              bitn  <= bitn + 1'b1;
            end else if (scl_fall) begin
              if (bitn == 4'd8) begin
                if (state == S_ADDR) begin
                  if (shreg[7:1] == SLAVE_ADDR) begin
                    sda_oe <= 1'b1;
                    rw     <= shreg[0];
                    state  <= S_ACK_ADDR;
                  end else begin
                    state  <= S_IDLE;
                  end
                end else begin
                  sda_oe   <= 1'b1;
                  rx_valid <= 1'b1;
                  rx_data  <= shreg;
                  state    <= S_ACK_DATA;
                end
              end
            end
          end

          S_ACK_ADDR: if (scl_fall) begin
            bitn <= '0;
            if (rw) begin
              shreg  <= tx_hold;
              sda_oe <= ~tx_hold[7];
              state  <= S_READ;
            end else begin
              sda_oe      <= 1'b0;
              frame_start <= 1'b1;
              state       <= S_WRITE;
            end
          end

          S_ACK_DATA: if (scl_fall) begin
            sda_oe <= 1'b0;
            bitn   <= '0;
            state  <= S_WRITE;
          end

          S_READ: if (scl_fall) begin
            if (bitn == 4'd7) begin
              sda_oe <= 1'b0;
              state  <= S_READ_ACK;
            end else begin
              sda_oe <= ~shreg[6];
              shreg  <= {shreg[6:0], 1'b0};
            end
            bitn <= bitn + 1'b1;
          end

          S_READ_ACK: begin
            if (scl_rise) begin
              master_ack <= ~sda_sync[1];
            end else if (scl_fall) begin
              bitn <= '0;
              if (master_ack) begin
                shreg  <= tx_hold;
                sda_oe <= ~tx_hold[7];
                state  <= S_READ;
              end else begin
                state  <= S_IDLE;
              end
            end
          end

          default: state <= S_IDLE;
        endcase
      end
    end
  end

endmodule
