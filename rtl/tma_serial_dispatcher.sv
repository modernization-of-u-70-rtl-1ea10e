// tma_serial_dispatcher: RS-232 port of the TM archiving device.
//
// A plain UART, 8 data bits, no parity, one stop bit, LSB first, BAUD_DIV
// clocks per bit (12 MHz / 104 = 115 200 baud by default). The receiver
// synchronises rxd with two flops, waits for a start bit, checks it again
// half a bit later and then samples each data bit in its middle; a byte
// with a bad stop bit is dropped and flagged in rx_err (one-clock pulse).
// rx_valid pulses for one clock with rx_byte. The transmitter takes a byte
// when tx_valid and tx_ready are both high and sends it in 10 bit times.
// The document names the dispatcher and the RS-232 link; the frame format
// and the rate are this design's choices.
module tma_serial_dispatcher #(
  parameter int unsigned BAUD_DIV = 104
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rxd,
  output logic       txd,
  output logic       rx_valid,
  output logic [7:0] rx_byte,
  output logic       rx_err,
  input  logic       tx_valid,
  input  logic [7:0] tx_byte,
  output logic       tx_ready
);

  localparam int unsigned CW = $clog2(BAUD_DIV + 1);

  // Receiver.
  logic          r1, r2, r_busy;
  logic [CW-1:0] r_cnt;
  logic [3:0]    r_bit;
  logic [7:0]    r_sh;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r1 <= 1'b1; r2 <= 1'b1; r_busy <= 1'b0; r_cnt <= '0; r_bit <= '0; r_sh <= '0;
      rx_valid <= 1'b0; rx_byte <= '0; rx_err <= 1'b0;
    end else begin
      r1 <= rxd; r2 <= r1;
      rx_valid <= 1'b0; rx_err <= 1'b0;
      if (!r_busy) begin
        if (!r2) begin
          r_busy <= 1'b1;
          r_cnt  <= CW'(BAUD_DIV / 2);
          r_bit  <= '0;
        end
      end else if (r_cnt != 0) begin
        r_cnt <= r_cnt - 1'b1;
      end else begin
        r_cnt <= CW'(BAUD_DIV - 1);
        if (r_bit == 4'd0) begin
          if (r2) r_busy <= 1'b0;          // false start
          r_bit <= 4'd1;
        end else if (r_bit <= 4'd8) begin
          r_sh  <= {r2, r_sh[7:1]};
          r_bit <= r_bit + 1'b1;
        end else begin
          r_busy <= 1'b0;
          if (r2) begin
            rx_valid <= 1'b1;
            rx_byte  <= r_sh;
          end else begin
            rx_err <= 1'b1;
          end
        end
      end
    end
  end

  // Transmitter.
  logic [9:0]    t_sh;
  logic [3:0]    t_left;
  logic [CW-1:0] t_cnt;

  assign tx_ready = (t_left == 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t_sh <= '1; t_left <= '0; t_cnt <= '0; txd <= 1'b1;
    end else if (t_left == 0) begin
      txd <= 1'b1;
      if (tx_valid) begin
        t_sh   <= {1'b1, tx_byte, 1'b0};
        t_left <= 4'd10;
        t_cnt  <= '0;
      end
    end else begin
      txd <= t_sh[0];
      if (t_cnt == CW'(BAUD_DIV - 1)) begin
        t_cnt  <= '0;
        t_sh   <= {1'b1, t_sh[9:1]};
        t_left <= t_left - 1'b1;
      end else begin
        t_cnt <= t_cnt + 1'b1;
      end
    end
  end

endmodule
