// spi_slave: host interface of the DD-PUF device.
//
// An external SPI master (in the lab setup a USB-SPI bridge) uses it to set
// the length of the evaluation phase, to start a read-out and to read the
// response. SPI mode 0 is used: CS low selects the device, MOSI is sampled
// on the rising edge of SCK, MISO changes on the falling edge, most
// significant bit first. SCK, MOSI and CS are synchronised to the system
// clock with two flip-flops and their edges detected there, so SCK must be
// at most about one eighth of the system clock.
//
// Every transaction starts with a command byte (dd_puf_pkg::spi_cmd_e):
//   0x01 WR_DHIGH    one data byte in: Delta_HIGH - 1 (reset value 255,
//                    i.e. 256 cycles)
//   0x02 EVALUATE    a one-cycle pulse on `eval_go` at the end of the byte
//   0x03 RD_STATUS   bytes out: {6'b0, busy, valid}, repeated
//   0x04 RD_RESPONSE N/8 bytes out, response bit N-1 first; 0 after that
//   0x05 RD_DHIGH    one byte out: the Delta_HIGH register
// Reply bytes appear in the bytes that follow the command byte; MISO is 0
// during the command byte and whenever CS is high (two-state output; an
// external buffer would tristate it on a shared bus).
//
// The pin set (SCK, MOSI, MISO, CS) and the role of the interface follow the
// published test setup; the SPI mode, command set and register layout are
// this design's own.
module spi_slave
  import dd_puf_pkg::*;
#(
  parameter int unsigned              N           = N_BITS,  // response width
  parameter logic [DHIGH_W-1:0]       DHIGH_RESET = 8'd255   // 256 cycles
) (
  input  logic               clk,
  input  logic               rst_n,
  // SPI pins
  input  logic               sck,
  input  logic               mosi,
  input  logic               cs_n,
  output logic               miso,
  // to/from the excitation controller
  output logic [DHIGH_W-1:0] dhigh,
  output logic               eval_go,
  input  logic               busy,
  input  logic               valid,
  input  logic [N-1:0]       response
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned N_BYTES = N / 8;

  // Synchronisers and edge detection.
  logic [2:0] sck_sync;
  logic [1:0] cs_sync;
  logic [1:0] mosi_sync;
  logic       sck_rise, sck_fall, active;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sck_sync  <= '0;
      cs_sync   <= '1;
      mosi_sync <= '0;
    end else begin
      sck_sync  <= {sck_sync[1:0], sck};
      cs_sync   <= {cs_sync[0], cs_n};
      mosi_sync <= {mosi_sync[0], mosi};
    end
  end

  assign active   = !cs_sync[1];
  assign sck_rise = sck_sync[1] && !sck_sync[2];
  assign sck_fall = !sck_sync[1] && sck_sync[2];

  // Byte framing.
  logic [2:0] bit_cnt;
  logic [6:0] rx_shift;
  logic [7:0] rx_byte;
  logic [7:0] byte_idx;     // bytes completed in this transaction
  spi_cmd_e   cmd;
  logic [7:0] tx_shift;
  logic [7:0] tx_next;
  logic       load_pending;

  assign rx_byte = {rx_shift, mosi_sync[1]};

  // Reply byte to send after byte `idx` of the transaction has completed.
  function automatic logic [7:0] reply(input spi_cmd_e c, input logic [7:0] idx,
                                       input logic [N-1:0] resp, input logic b,
                                       input logic v, input logic [7:0] dh);
    logic [7:0] r;
    r = 8'h00;
    unique case (c)
      CMD_RD_STATUS:   r = {6'b0, b, v};
      CMD_RD_DHIGH:    r = (idx == 8'd0) ? dh : 8'h00;
      CMD_RD_RESPONSE: begin
        for (int unsigned k = 0; k < N_BYTES; k++)
          if (idx == 8'(k)) r = resp[N-1-8*k -: 8];
      end
      default:         r = 8'h00;
    endcase
    return r;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bit_cnt      <= '0;
      rx_shift     <= '0;
      byte_idx     <= '0;
      cmd          <= CMD_NOP;
      tx_shift     <= '0;
      tx_next      <= '0;
      load_pending <= 1'b0;
      dhigh        <= DHIGH_RESET;
      eval_go      <= 1'b0;
    end else begin
      eval_go <= 1'b0;
      if (!active) begin
        bit_cnt      <= '0;
        byte_idx     <= '0;
        cmd          <= CMD_NOP;
        tx_shift     <= '0;
        load_pending <= 1'b0;
      end else begin
        if (sck_rise) begin
          rx_shift <= rx_byte[6:0];
          bit_cnt  <= bit_cnt + 1'b1;
          if (bit_cnt == 3'd7) begin
            load_pending <= 1'b1;
            if (byte_idx != 8'hff) byte_idx <= byte_idx + 1'b1;
            if (byte_idx == 8'd0) begin
              cmd     <= spi_cmd_e'(rx_byte);
              tx_next <= reply(spi_cmd_e'(rx_byte), 8'd0, response, busy, valid, dhigh);
              if (spi_cmd_e'(rx_byte) == CMD_EVALUATE) eval_go <= 1'b1;
            end else begin
              tx_next <= reply(cmd, byte_idx, response, busy, valid, dhigh);
              if (cmd == CMD_WR_DHIGH && byte_idx == 8'd1) dhigh <= rx_byte;
            end
          end
        end
        if (sck_fall) begin
          if (load_pending) begin
            tx_shift     <= tx_next;
            load_pending <= 1'b0;
          end else begin
            tx_shift <= {tx_shift[6:0], 1'b0};
          end
        end
      end
    end
  end

  assign miso = active && tx_shift[7];
endmodule
