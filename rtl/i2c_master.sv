// i2c_master: single I2C bus master.
//
// The master repeatedly runs one fixed-format frame while it is out of reset:
// START, the 7-bit slave address and the R/W bit, an acknowledge slot, data
// byte 1, an acknowledge slot, data byte 2, an acknowledge slot, STOP. On a
// write it shifts data1/data2 out; on a read it releases SDA and shifts the
// two bytes sent by the slave into s_datain1/s_datain2. All three acknowledge
// slots are driven by the slave in both directions, as in the document's
// flow chart (ADDRESS -> SLAVE_ACK -> DATA IN-1 -> SLAVE-DATA 1_ACK ->
// DATA IN-2 -> SLAVE DATA 2_ACK -> STOP -> START). A synchronous active-high
// reset returns the state machine to START from any state.
//
// Timing: each SCL period is four "quarters" of QUARTER system clocks, with
// QUARTER = CLK_FREQ_HZ / (4 * SCL_FREQ_HZ). Inside one bit slot the master
// changes SDA in quarter 0 (SCL low), raises SCL in quarter 1, samples SDA in
// quarter 2 and lowers SCL in quarter 3. START pulls SDA low while SCL is high;
// STOP releases SDA while SCL is high. A frame lasts 29 SCL periods (START,
// 27 bit slots, STOP), i.e. 116 * QUARTER clocks from leaving START to the
// done pulse.
//
// Interface: cmd is sampled at the first quarter of every frame; a new value
// can be applied at the done pulse. sda_out is an open-drain style output
// (1 = released); sda_in carries the slave's SDA, as the block diagram draws
// the two directions as separate lines. ack_rx holds the three acknowledges
// of the frame in progress or just finished (bit 0 = address). An assertion
// checks the bus rule that SDA changes while SCL is high only for START/STOP.
//
// Choices of this design, not given by the document: SCL frequency and
// system clock (defaults 100 kHz from 100 MHz), R/W polarity (0 = write),
// and that a missing acknowledge ends the frame with STOP at once.
module i2c_master
  import i2c_pkg::*;
#(
  parameter int unsigned CLK_FREQ_HZ = 100_000_000,
  parameter int unsigned SCL_FREQ_HZ = 100_000
) (
  input  logic       clk,
  input  logic       rst,
  input  i2c_cmd_t   cmd,
  input  logic       sda_in,
  output logic       sda_out,
  output logic       scl,
  output logic [7:0] s_datain1,
  output logic [7:0] s_datain2,
  output logic [2:0] ack_rx,
  output logic       busy,
  output logic       done
);

  localparam int unsigned QUARTER = CLK_FREQ_HZ / (4 * SCL_FREQ_HZ);
  localparam int unsigned QW      = (QUARTER > 1) ? $clog2(QUARTER) : 1;

  initial begin
    if (QUARTER < 4)
      $error("i2c_master: CLK_FREQ_HZ must be at least 16 * SCL_FREQ_HZ");
  end

  // Quarter-period tick.
  logic [QW-1:0] qcnt;
  logic          tick;

  assign tick = (qcnt == QW'(QUARTER - 1));

  always_ff @(posedge clk) begin
    if (rst || tick) qcnt <= '0;
    else             qcnt <= qcnt + 1'b1;
  end

  m_state_t  state;
  logic [1:0] phase;     // quarter within the current bit slot
  logic [2:0] bitcnt;    // 0 to 7 counter of the byte states
  i2c_cmd_t  cmd_q;
  logic [7:0] tx_sh;
  logic [7:0] rx_sh;
  logic       is_read;

  assign is_read = (cmd_q.rw == RW_READ);

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= M_START;
      phase     <= 2'd0;
      bitcnt    <= 3'd0;
      cmd_q     <= '0;
      tx_sh     <= '0;
      rx_sh     <= '0;
      sda_out   <= 1'b1;
      scl       <= 1'b1;
      s_datain1 <= '0;
      s_datain2 <= '0;
      ack_rx    <= '0;
      busy      <= 1'b0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      if (tick) begin
        phase <= phase + 2'd1;
        unique case (state)
          M_START: begin
            unique case (phase)
              2'd0: begin
                sda_out <= 1'b1;
                scl     <= 1'b1;
                cmd_q   <= cmd;
                ack_rx  <= '0;
                busy    <= 1'b1;
              end
              2'd1: ;
              2'd2: sda_out <= 1'b0;            // START: SDA falls, SCL high
              2'd3: begin
                scl    <= 1'b0;
                state  <= M_ADDRESS;
                bitcnt <= 3'd0;
                tx_sh  <= {cmd_q.addr, cmd_q.rw};
              end
            endcase
          end

          M_ADDRESS, M_DATA_1, M_DATA_2: begin
            unique case (phase)
              2'd0: sda_out <= (state != M_ADDRESS && is_read) ? 1'b1 : tx_sh[7];
              2'd1: scl <= 1'b1;
              2'd2: rx_sh <= {rx_sh[6:0], sda_in};
              2'd3: begin
                scl <= 1'b0;
                if (bitcnt == 3'd7) begin
                  bitcnt <= 3'd0;
                  unique case (state)
                    M_ADDRESS: state <= M_SLAVE_ACK;
                    M_DATA_1: begin
                      state <= M_DATA_1_ACK;
                      if (is_read) s_datain1 <= rx_sh;
                    end
                    default: begin
                      state <= M_DATA_2_ACK;
                      if (is_read) s_datain2 <= rx_sh;
                    end
                  endcase
                end else begin
                  bitcnt <= bitcnt + 3'd1;
                  tx_sh  <= {tx_sh[6:0], 1'b0};
                end
              end
            endcase
          end

          M_SLAVE_ACK, M_DATA_1_ACK, M_DATA_2_ACK: begin
            unique case (phase)
              2'd0: sda_out <= 1'b1;             // release SDA for the slave
              2'd1: scl <= 1'b1;
              2'd2: begin
                unique case (state)
                  M_SLAVE_ACK:  ack_rx[0] <= ~sda_in;
                  M_DATA_1_ACK: ack_rx[1] <= ~sda_in;
                  default:      ack_rx[2] <= ~sda_in;
                endcase
              end
              2'd3: begin
                scl <= 1'b0;
                unique case (state)
                  M_SLAVE_ACK: begin
                    state <= ack_rx[0] ? M_DATA_1 : M_STOP;
                    tx_sh <= cmd_q.data1;
                  end
                  M_DATA_1_ACK: begin
                    state <= ack_rx[1] ? M_DATA_2 : M_STOP;
                    tx_sh <= cmd_q.data2;
                  end
                  default: state <= M_STOP;
                endcase
              end
            endcase
          end

          M_STOP: begin
            unique case (phase)
              2'd0: sda_out <= 1'b0;
              2'd1: scl <= 1'b1;
              2'd2: sda_out <= 1'b1;             // STOP: SDA rises, SCL high
              2'd3: begin
                state <= M_START;
                busy  <= 1'b0;
                done  <= 1'b1;
              end
            endcase
          end

          default: state <= M_START;
        endcase
      end
    end
  end

  // Bus rule: while SCL stays high, SDA may change only as START or STOP.
  sda_stable_while_scl_high: assert property (
    @(posedge clk) disable iff (rst)
      ($past(scl) && scl && (sda_out != $past(sda_out))) |-> (state inside {M_START, M_STOP})
  ) else $error("i2c_master: SDA changed while SCL high outside START/STOP");

endmodule
