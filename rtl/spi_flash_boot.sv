// spi_flash_boot: hardware bootloader of the GPC domain.
//
// The GPC's program and data live in volatile SRAM, so after every power-up
// of the domain, and later whenever the GPC asks for another page, pages are
// copied from an external SPI flash. One page load is one flash READ (0x03)
// transaction: chip select low, the command byte and a 24-bit byte address
// sent MSB first, then PAGE_BYTES bytes received. Bytes are packed
// little-endian into 32-bit words, and each completed word is written with a
// one-cycle mem_we pulse to word address page*PAGE_BYTES/4 + n of the
// selected memory (mem_dmem=0 instruction SRAM, 1 data SRAM).
//
// Flash layout: instruction pages start at byte 0, data pages at
// DMEM_FLASH_BASE. SPI mode 0; SCK is high and low for HALF_DIV clock cycles
// each, so one page takes about (32 + 8*PAGE_BYTES) * 2*HALF_DIV + 2 cycles.
//
// After reset (which the domain's power-up sequence provides) page 0 of the
// instruction memory loads by itself; boot_done then rises and stays high.
// Further pages are requested with req_valid/req_ready (a transfer happens
// when both are high), req_dmem and req_page; req_done pulses when that
// page is in memory.
//
// The published design states only that a hardware bootloader loads pages
// of program and data memory on demand from an SPI flash after each
// power-up. Page size, flash command, layout and the request handshake are
// this design's own choices.
module spi_flash_boot #(
  parameter int unsigned PAGE_BYTES      = 256,
  parameter int unsigned PAGE_W          = 9,      // page index width
  parameter int unsigned MEM_AW          = 15,     // word address width
  parameter int unsigned HALF_DIV        = 1,
  parameter logic [23:0] DMEM_FLASH_BASE = 24'h01_8000
) (
  input  logic              clk,
  input  logic              rst_n,
  // page requests from the GPC
  input  logic              req_valid,
  output logic              req_ready,
  input  logic              req_dmem,
  input  logic [PAGE_W-1:0] req_page,
  output logic              req_done,
  output logic              boot_done,
  output logic              busy,
  // memory write port
  output logic              mem_we,
  output logic              mem_dmem,
  output logic [MEM_AW-1:0] mem_addr,
  output logic [31:0]       mem_wdata,
  // SPI flash
  output logic              spi_sck,
  output logic              spi_cs_n,
  output logic              spi_mosi,
  input  logic              spi_miso
);

  localparam int unsigned PAGE_WORDS = PAGE_BYTES / 4;
  localparam int unsigned TOTAL_BITS = 32 + 8 * PAGE_BYTES;
  localparam int unsigned BCW        = $clog2(TOTAL_BITS + 1);
  localparam int unsigned DCW        = (HALF_DIV > 1) ? $clog2(HALF_DIV) : 1;
  localparam logic [7:0]  CMD_READ   = 8'h03;

  typedef enum logic [1:0] {B_IDLE, B_XFER, B_END} bstate_t;

  bstate_t           state_q;
  logic              auto_q;       // the power-up page is still to be loaded
  logic              boot_q;
  logic              dmem_q;
  logic [MEM_AW-1:0] base_q;       // first word address of the page
  logic [MEM_AW-1:0] wcnt_q;       // words written so far
  logic [31:0]       tx_q;
  logic [BCW-1:0]    bit_q;
  logic [DCW-1:0]    div_q;
  logic              sck_q;
  logic [7:0]        rx_byte_q;
  logic [23:0]       rx_word_q;

  // start of a page load
  logic              start;
  logic              start_dmem;
  logic [PAGE_W-1:0] start_page;
  logic [23:0]       start_faddr;

  assign req_ready  = (state_q == B_IDLE) && !auto_q;
  assign start      = (state_q == B_IDLE) && (auto_q || req_valid);
  assign start_dmem = auto_q ? 1'b0 : req_dmem;
  assign start_page = auto_q ? '0 : req_page;
  assign start_faddr = (start_dmem ? DMEM_FLASH_BASE : 24'h0) +
                       24'(start_page) * 24'(PAGE_BYTES);

  logic tick;
  assign tick = (div_q == DCW'(HALF_DIV - 1));

  logic [7:0] byte_now;
  assign byte_now = {rx_byte_q[6:0], spi_miso};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= B_IDLE;
      auto_q    <= 1'b1;
      boot_q    <= 1'b0;
      dmem_q    <= 1'b0;
      base_q    <= '0;
      wcnt_q    <= '0;
      tx_q      <= '0;
      bit_q     <= '0;
      div_q     <= '0;
      sck_q     <= 1'b0;
      rx_byte_q <= '0;
      rx_word_q <= '0;
      spi_cs_n  <= 1'b1;
      mem_we    <= 1'b0;
      mem_addr  <= '0;
      mem_wdata <= '0;
      req_done  <= 1'b0;
    end else begin
      mem_we   <= 1'b0;
      req_done <= 1'b0;
      unique case (state_q)
        B_IDLE: begin
          if (start) begin
            state_q  <= B_XFER;
            dmem_q   <= start_dmem;
            base_q   <= MEM_AW'(start_page) * MEM_AW'(PAGE_WORDS);
            wcnt_q   <= '0;
            tx_q     <= {CMD_READ, start_faddr};
            bit_q    <= '0;
            div_q    <= '0;
            sck_q    <= 1'b0;
            spi_cs_n <= 1'b0;
          end
        end
        B_XFER: begin
          if (!tick) begin
            div_q <= div_q + 1'b1;
          end else begin
            div_q <= '0;
            if (!sck_q) begin
              // rising edge: flash samples MOSI, we sample MISO
              sck_q <= 1'b1;
              if (bit_q >= BCW'(32)) begin
                rx_byte_q <= byte_now;
                if (bit_q[2:0] == 3'd7) begin
                  if (bit_q[4:3] == 2'd3) begin
                    mem_we    <= 1'b1;
                    mem_addr  <= base_q + wcnt_q;
                    mem_wdata <= {byte_now, rx_word_q};
                    wcnt_q    <= wcnt_q + 1'b1;
                  end else begin
                    rx_word_q <= {byte_now, rx_word_q[23:8]};
                  end
                end
              end
            end else begin
              // falling edge: next bit
              sck_q <= 1'b0;
              tx_q  <= {tx_q[30:0], 1'b0};
              bit_q <= bit_q + 1'b1;
              if (bit_q == BCW'(TOTAL_BITS - 1)) state_q <= B_END;
            end
          end
        end
        B_END: begin
          spi_cs_n <= 1'b1;
          state_q  <= B_IDLE;
          if (auto_q) begin
            auto_q <= 1'b0;
            boot_q <= 1'b1;
          end else begin
            req_done <= 1'b1;
          end
        end
        default: state_q <= B_IDLE;
      endcase
    end
  end

  assign mem_dmem  = dmem_q;
  assign spi_sck   = sck_q;
  assign spi_mosi  = tx_q[31];
  assign boot_done = boot_q;
  assign busy      = (state_q != B_IDLE) || auto_q;

  // A request is only accepted while no page is loading.
  assert property (@(posedge clk) disable iff (!rst_n) (req_valid && req_ready) |-> state_q == B_IDLE)
    else $error("spi_flash_boot: request accepted while busy");

endmodule
