// dac_model: behavioural model of an 8-bit I2C DAC, simulation only. It
// answers to ADDR, acknowledges its address unless nack is set, takes one
// data byte as its output code and counts completed writes. It watches the
// bus levels scl/sda on every clock and pulls SDA low through sda_oe.
module dac_model #(
  parameter logic [6:0] ADDR = 7'h4C
) (
  input  logic       clk,
  input  logic       scl,
  input  logic       sda,
  input  logic       nack,
  output logic       sda_oe,
  output logic [7:0] value,
  output int         writes
);
  logic       scl_q = 1'b1, sda_q = 1'b1;
  int         nbit = 0;
  int         nbyte = 0;
  logic [7:0] sh = '0;
  logic       active = 1'b0;
  logic       acking = 1'b0;

  initial begin
    sda_oe = 1'b0;
    value  = '0;
    writes = 0;
  end

  always @(posedge clk) begin
    scl_q <= scl;
    sda_q <= sda;
    if (scl && scl_q && sda_q && !sda) begin           // START
      active <= 1'b1;  nbit <= 0;  nbyte <= 0;  sda_oe <= 1'b0;  acking <= 1'b0;
    end else if (scl && scl_q && !sda_q && sda) begin  // STOP
      active <= 1'b0;  sda_oe <= 1'b0;
    end else if (active && scl && !scl_q) begin        // SCL rising
      if (!acking) begin
        sh   <= {sh[6:0], sda};
        nbit <= nbit + 1;
      end
    end else if (active && !scl && scl_q) begin        // SCL falling
      if (acking) begin
        acking <= 1'b0;
        sda_oe <= 1'b0;
        nbit   <= 0;
        nbyte  <= nbyte + 1;
      end else if (nbit == 8) begin
        if (nbyte == 0) begin
          if (sh[7:1] == ADDR && !sh[0] && !nack) begin
            sda_oe <= 1'b1;  acking <= 1'b1;
          end else begin
            active <= 1'b0;
          end
        end else if (nbyte == 1) begin
          value  <= sh;
          writes <= writes + 1;
          sda_oe <= 1'b1;  acking <= 1'b1;
        end
      end
    end
  end
endmodule
