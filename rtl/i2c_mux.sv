// i2c_mux: routes the single I2C master to one of N separate DAC buses.
//
// All DACs answer to the same I2C address, so each sits on its own pair of
// pins and the DAC is chosen by the bus it is reached on. The selected bus
// carries the master's open-drain pull-low enables and returns its SDA level
// to the master; every other bus is left released (both lines high through
// the board pull-ups). Purely combinational.
//
// Interface: m_* is the master side, ch_* are the N pin pairs, sel picks the
// bus. Open-drain lines are modelled as "pull low" enables (_oe = 1 drives
// the line low) and a sampled level (_i).
//
// From the device paper: four pin pairs and addressing by switching the
// multiplexer. This design's own choice: the open-drain modelling.
module i2c_mux #(
  parameter int unsigned N = 4
) (
  input  logic [$clog2(N)-1:0] sel,
  input  logic                 m_scl_oe,
  input  logic                 m_sda_oe,
  output logic                 m_sda_i,
  output logic [N-1:0]         ch_scl_oe,
  output logic [N-1:0]         ch_sda_oe,
  input  logic [N-1:0]         ch_sda_i
);

  always_comb begin
    ch_scl_oe = '0;
    ch_sda_oe = '0;
    ch_scl_oe[sel] = m_scl_oe;
    ch_sda_oe[sel] = m_sda_oe;
    m_sda_i = ch_sda_i[sel];
  end

endmodule
