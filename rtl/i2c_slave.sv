// i2c_slave: I2C slave with a 7-bit address ID and two data registers.
//
// The slave watches SCL and the master's SDA line through two-flop
// synchronisers. SDA falling while SCL is high is a START and begins a frame;
// SDA rising while SCL is high is a STOP and returns it to idle. Bits are
// taken on the rising edge of SCL and the slave changes its own SDA output
// after the falling edge, so in a well-formed frame it never changes SDA while
// SCL is high (a START or STOP, which always releases SDA, is the exception).
//
// After START the first eight bits are the address and R/W bit. If the address
// equals SLAVE_ADDR the slave pulls SDA low for the next slot (s_ack1);
// otherwise it stays silent until the next START or STOP. On a write it then
// stores the two following bytes in s_data1 and s_data2, acknowledging each
// (s_ack2, s_ack3). On a read it sends the contents of s_data1 and s_data2,
// MSB first, and also drives the acknowledge slot after each byte, as the
// document's flow chart gives every acknowledge to the slave. The s_ack flags
// are cleared at START and stay set until the next START.
//
// Interface: sda_out is open-drain style (1 = released) and is a separate
// line back to the master, as in the block diagram. rst1 is a synchronous
// active-high reset that clears the registers and the flags.
//
// Choices of this design, not given by the document: the address value
// (default 7'h50), that a read returns the last bytes written (so that a
// write followed by a read gives the same output), and the synchronisers,
// which require SCL quarter periods of at least four system clocks.
module i2c_slave
  import i2c_pkg::*;
#(
  parameter logic [6:0] SLAVE_ADDR = 7'h50
) (
  input  logic       clk,
  input  logic       rst1,
  input  logic       scl,
  input  logic       sda_in,
  output logic       sda_out,
  output logic       s_ack1,
  output logic       s_ack2,
  output logic       s_ack3,
  output logic [7:0] s_data1,
  output logic [7:0] s_data2
);

  // Synchronisers and edge detection.
  logic [1:0] scl_sync, sda_sync;
  logic       scl_d, sda_d;
  logic       scl_s, sda_s;

  assign scl_s = scl_sync[1];
  assign sda_s = sda_sync[1];

  always_ff @(posedge clk) begin
    if (rst1) begin
      scl_sync <= 2'b11;
      sda_sync <= 2'b11;
      scl_d    <= 1'b1;
      sda_d    <= 1'b1;
    end else begin
      scl_sync <= {scl_sync[0], scl};
      sda_sync <= {sda_sync[0], sda_in};
      scl_d    <= scl_s;
      sda_d    <= sda_s;
    end
  end

  logic scl_rise, scl_fall, start_det, stop_det;
  assign scl_rise  = scl_s & ~scl_d;
  assign scl_fall  = ~scl_s & scl_d;
  assign start_det = scl_s & scl_d & sda_d & ~sda_s;
  assign stop_det  = scl_s & scl_d & ~sda_d & sda_s;

  s_state_t   state;
  logic [3:0] bitcnt;    // SCL rising edges seen in the current byte
  logic [7:0] rx_sh;
  logic [7:0] tx_sh;
  logic       rw;

  always_ff @(posedge clk) begin
    if (rst1) begin
      state   <= S_IDLE;
      bitcnt  <= 4'd0;
      rx_sh   <= '0;
      tx_sh   <= '0;
      rw      <= 1'b0;
      sda_out <= 1'b1;
      s_ack1  <= 1'b0;
      s_ack2  <= 1'b0;
      s_ack3  <= 1'b0;
      s_data1 <= '0;
      s_data2 <= '0;
    end else if (start_det) begin
      state   <= S_ADDRESS;
      bitcnt  <= 4'd0;
      sda_out <= 1'b1;
      s_ack1  <= 1'b0;
      s_ack2  <= 1'b0;
      s_ack3  <= 1'b0;
    end else if (stop_det) begin
      state   <= S_IDLE;
      sda_out <= 1'b1;
    end else if (scl_rise) begin
      rx_sh  <= {rx_sh[6:0], sda_s};
      bitcnt <= bitcnt + 4'd1;
    end else if (scl_fall) begin
      unique case (state)
        S_ADDRESS: begin
          if (bitcnt == 4'd8) begin
            bitcnt <= 4'd0;
            if (rx_sh[7:1] == SLAVE_ADDR) begin
              state   <= S_ADDR_ACK;
              rw      <= rx_sh[0];
              sda_out <= 1'b0;
              s_ack1  <= 1'b1;
            end else begin
              state <= S_WAIT_STOP;
            end
          end
        end

        S_ADDR_ACK, S_DATA_1_ACK: begin
          bitcnt <= 4'd0;
          state <= (state == S_ADDR_ACK) ? S_DATA_1 : S_DATA_2;
          if (rw == RW_READ) begin
            // first bit of the byte to send goes out now, the rest follow
            sda_out <= (state == S_ADDR_ACK) ? s_data1[7] : s_data2[7];
            tx_sh   <= (state == S_ADDR_ACK) ? {s_data1[6:0], 1'b0}
                                             : {s_data2[6:0], 1'b0};
          end else begin
            sda_out <= 1'b1;
          end
        end

        S_DATA_1, S_DATA_2: begin
          if (bitcnt == 4'd8) begin
            bitcnt  <= 4'd0;
            sda_out <= 1'b0;
            if (state == S_DATA_1) begin
              state  <= S_DATA_1_ACK;
              s_ack2 <= 1'b1;
              if (rw == RW_WRITE) s_data1 <= rx_sh;
            end else begin
              state  <= S_DATA_2_ACK;
              s_ack3 <= 1'b1;
              if (rw == RW_WRITE) s_data2 <= rx_sh;
            end
          end else if (bitcnt != 4'd0) begin
            if (rw == RW_READ) begin
              sda_out <= tx_sh[7];
              tx_sh   <= {tx_sh[6:0], 1'b0};
            end
          end
        end

        S_DATA_2_ACK: begin
          state   <= S_WAIT_STOP;
          sda_out <= 1'b1;
        end

        default: sda_out <= 1'b1;   // S_IDLE, S_WAIT_STOP
      endcase
    end
  end

endmodule
