// topmodule: I2C single master connected to one I2C slave.
//
// The two blocks are wired as in the design's block diagram: the master (m1)
// drives SCL and its SDA_OUT into the slave's SDA_IN, and the slave (m2)
// returns acknowledges and read data on its own SDA_OUT into the master's
// SDA_IN. sda_bus is the wired-AND of the two SDA outputs, i.e. the level an
// open-drain SDA wire would carry; it is brought out for observation only.
//
// Inputs are the clock, the master reset rst, the slave reset rst1 and the
// 24-bit command {address[6:0], R/W, data1[7:0], data2[7:0]}. While rst is
// low the master runs one 27-slot frame after another, sampling cmd at the
// start of each; done pulses at the end of every frame. Outputs are the bytes
// stored in the slave (s_data1, s_data2), the bytes the master read
// (s_datain1, s_datain2), the slave's three acknowledge flags and the
// acknowledges seen by the master.
//
// Clock, SCL rate and slave address are parameters of this design; the
// document does not give values for them.
module topmodule
  import i2c_pkg::*;
#(
  parameter int unsigned CLK_FREQ_HZ = 100_000_000,
  parameter int unsigned SCL_FREQ_HZ = 100_000,
  parameter logic [6:0]  SLAVE_ADDR  = 7'h50
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       rst1,
  input  i2c_cmd_t   cmd,
  output logic       scl,
  output logic       sda_bus,
  output logic [7:0] s_data1,
  output logic [7:0] s_data2,
  output logic [7:0] s_datain1,
  output logic [7:0] s_datain2,
  output logic       s_ack1,
  output logic       s_ack2,
  output logic       s_ack3,
  output logic [2:0] ack_rx,
  output logic       busy,
  output logic       done
);

  logic m_sda_out;  // master SDA_OUT -> slave SDA_IN
  logic s_sda_out;  // slave SDA_OUT -> master SDA_IN

  i2c_master #(
    .CLK_FREQ_HZ(CLK_FREQ_HZ),
    .SCL_FREQ_HZ(SCL_FREQ_HZ)
  ) m1 (
    .clk      (clk),
    .rst      (rst),
    .cmd      (cmd),
    .sda_in   (s_sda_out),
    .sda_out  (m_sda_out),
    .scl      (scl),
    .s_datain1(s_datain1),
    .s_datain2(s_datain2),
    .ack_rx   (ack_rx),
    .busy     (busy),
    .done     (done)
  );

  i2c_slave #(
    .SLAVE_ADDR(SLAVE_ADDR)
  ) m2 (
    .clk    (clk),
    .rst1   (rst1),
    .scl    (scl),
    .sda_in (m_sda_out),
    .sda_out(s_sda_out),
    .s_ack1 (s_ack1),
    .s_ack2 (s_ack2),
    .s_ack3 (s_ack3),
    .s_data1(s_data1),
    .s_data2(s_data2)
  );

  assign sda_bus = m_sda_out & s_sda_out;

endmodule
