// spi_flash_model: behavioural model of a serial NOR flash, testbench only.
// Understands the READ command (0x03 + 24-bit address, SPI mode 0) and
// streams bytes from consecutive addresses until chip select rises. The
// content is a fixed function of the address, flash_byte(), so a testbench
// can predict every byte without a data file. `reads` counts READ
// transactions and `last_addr` keeps the address of the most recent one.
module spi_flash_model (
  input  logic sck,
  input  logic cs_n,
  input  logic mosi,
  output logic miso
);

  function automatic logic [7:0] flash_byte(logic [23:0] a);
    return 8'((a * 37) ^ (a >> 7) ^ 24'h5A);
  endfunction

  int          bits;
  logic [31:0] cmd;
  logic [23:0] addr;
  logic [7:0]  sh;
  int          reads = 0;
  int          bad_cmds = 0;
  logic [23:0] last_addr = 0;

  initial miso = 0;

  always @(negedge cs_n) begin
    bits = 0;
    cmd  = 0;
  end

  always @(posedge sck) if (!cs_n) begin
    if (bits < 32) begin
      cmd  = {cmd[30:0], mosi};
      bits = bits + 1;
      if (bits == 32) begin
        addr = cmd[23:0];
        last_addr = addr;
        if (cmd[31:24] == 8'h03) reads++;
        else bad_cmds++;
      end
    end else begin
      bits = bits + 1;
    end
  end

  always @(negedge sck) if (!cs_n && bits >= 32) begin
    if ((bits - 32) % 8 == 0) begin
      sh   = flash_byte(addr);
      addr = addr + 1;
    end
    miso = sh[7];
    sh   = {sh[6:0], 1'b0};
  end

endmodule
