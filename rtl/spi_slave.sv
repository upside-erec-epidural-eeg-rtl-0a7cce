// spi_slave - 4-wire SPI slave giving access to the register bank.
//
// cs_n (active low), sclk, mosi and miso. Data is captured on the rising
// edge of sclk and shifted out on the falling edge (SPI mode 0). A frame is
// 40 bits, MSB first: an 8-bit command (bit 7 = 1 for write, bits 3:0 the
// register address) followed by 32 data bits. For a write, wr_en is raised
// combinationally while the 40th bit is on mosi, so the register bank
// (clocked by the same sclk) stores the word on that rising edge. For a
// read, the register addressed by the command is loaded on the falling edge
// after the 8th bit and shifted out on miso, MSB first, during the 32 data
// bits. The rising edge of cs_n clears the frame state and aborts a frame,
// so after power-up the master raises cs_n once before the first frame;
// miso is low while cs_n is high.
//
// The four wires and the capture/shift edges follow the specification; the
// frame format is this design's own.
module spi_slave #(
  parameter int unsigned AW = 4,
  parameter int unsigned DW = 32
) (
  input  logic          sclk,
  input  logic          cs_n,
  input  logic          mosi,
  output logic          miso,
  output logic          wr_en,
  output logic [AW-1:0] addr,
  output logic [DW-1:0] wdata,
  input  logic [DW-1:0] rdata
);
  localparam int unsigned CMD_W = 8;
  localparam int unsigned FRAME = CMD_W + DW;
  localparam int unsigned NW    = $clog2(FRAME + 1);

  logic [NW-1:0]   cnt;     // rising edges seen in this frame
  logic [DW-2:0]   sh;      // received bits
  logic            is_wr;
  logic [DW-1:0]   rd_sh;
  logic            miso_r;

  always_ff @(posedge sclk or posedge cs_n) begin
    if (cs_n) begin
      cnt   <= '0;
      sh    <= '0;
      is_wr <= 1'b0;
      addr  <= '0;
    end else begin
      if (cnt != NW'(FRAME)) cnt <= cnt + 1'b1;
      sh <= {sh[DW-3:0], mosi};
      if (cnt == NW'(CMD_W - 1)) begin
        is_wr <= sh[CMD_W-2];
        addr  <= {sh[AW-2:0], mosi};
      end
    end
  end

  assign wr_en = !cs_n && is_wr && cnt == NW'(FRAME - 1);
  assign wdata = {sh, mosi};

  always_ff @(negedge sclk or posedge cs_n) begin
    if (cs_n) begin
      rd_sh  <= '0;
      miso_r <= 1'b0;
    end else if (cnt == NW'(CMD_W)) begin
      miso_r <= rdata[DW-1];
      rd_sh  <= rdata << 1;
    end else begin
      miso_r <= rd_sh[DW-1];
      rd_sh  <= rd_sh << 1;
    end
  end

  assign miso = !cs_n && miso_r;

  initial assert (AW <= CMD_W - 1 && DW >= 8) else $error("spi_slave: bad parameters");
endmodule
