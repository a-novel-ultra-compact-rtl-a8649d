// tb_spi_master: SPI mode-0 master used by the testbenches in place of the
// USB-SPI bridge of a lab setup.
//
// `xfer` runs one transaction: CS low, the bytes of `tx` sent MSB first
// (MOSI set while SCK is low, SCK high for HALF_NS, MISO sampled on the
// rising edge), then CS high. The received bytes are returned in `rx`.
// HALF_NS is half the SCK period; it must be several system-clock cycles
// because the slave samples SCK with the system clock.
module tb_spi_master #(
  parameter realtime HALF_NS = 100.0
) (
  output logic sck,
  output logic mosi,
  output logic cs_n,
  input  logic miso
);
  timeunit 1ns;
  timeprecision 1ps;

  initial begin
    sck  = 1'b0;
    mosi = 1'b0;
    cs_n = 1'b1;
  end

  task automatic xfer(input byte unsigned tx[], output byte unsigned rx[]);
    rx = new[tx.size()];
    cs_n = 1'b0;
    #(HALF_NS);
    foreach (tx[b]) begin
      for (int i = 7; i >= 0; i--) begin
        mosi = tx[b][i];
        #(HALF_NS);
        sck = 1'b1;
        rx[b][i] = miso;
        #(HALF_NS);
        sck = 1'b0;
      end
    end
    #(HALF_NS);
    cs_n = 1'b1;
    mosi = 1'b0;
    #(HALF_NS);
  endtask
endmodule
