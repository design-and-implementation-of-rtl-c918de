// crypto_top: the crypto embedded system's hardware.  Six coprocessors sit
// on one 32-bit memory-mapped bus whose master (the control CPU, outside
// this module) drives the m_* port:
//   select 0  AES-128 encrypt/decrypt        (aes_avalon)
//   select 1  SHA-1 block hashing            (sha1_avalon)
//   select 2  GF(p) modular arithmetic, MAP  (map_avalon, 163-bit)
//   select 3  RSA modular exponentiation     (rsa_modexp, up to 1024-bit)
//   select 4  GF(2^163) ECC point multiply   (ecc_core)
//   select 5  LZSS compression/decompression (lzss_avalon)
// Word address = {select[2:0], local[8:0]}; each slave's local register map
// is in its own header.  irq[i] is the "result ready" flag of slave i.
// The CPU, its memories, the UART, timer and PIO are not part of this
// module.
module crypto_top (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [11:0] m_address,
  input  logic        m_read,
  input  logic        m_write,
  input  logic [31:0] m_writedata,
  output logic [31:0] m_readdata,
  output logic [5:0]  irq
);
  localparam int unsigned NS = 6;
  logic [NS-1:0] cs;
  logic [8:0]    a;
  logic          rd, wr;
  logic [31:0]   wd;
  logic [31:0]   rdata [NS];

  avalon_interconnect #(.NS(NS), .SAW(3), .LAW(9)) u_bus (
    .clk, .m_address, .m_read, .m_write, .m_writedata, .m_readdata,
    .s_chipselect(cs), .s_address(a), .s_read(rd), .s_write(wr), .s_writedata(wd),
    .s_readdata(rdata));

  aes_avalon u_aes (.clk, .rst_n, .chipselect(cs[0]), .write(wr), .read(rd), .address(a[3:0]),
                    .writedata(wd), .readdata(rdata[0]), .irq(irq[0]));
  sha1_avalon u_sha (.clk, .rst_n, .chipselect(cs[1]), .write(wr), .read(rd), .address(a[3:0]),
                     .writedata(wd), .readdata(rdata[1]), .irq(irq[1]));
  map_avalon u_map (.clk, .rst_n, .chipselect(cs[2]), .write(wr), .read(rd), .address(a[5:0]),
                    .writedata(wd), .readdata(rdata[2]), .irq(irq[2]));
  rsa_modexp u_rsa (.clk, .rst_n, .chipselect(cs[3]), .write(wr), .read(rd), .address(a[7:0]),
                    .writedata(wd), .readdata(rdata[3]), .irq(irq[3]));
  ecc_core u_ecc (.clk, .rst_n, .chipselect(cs[4]), .write(wr), .read(rd), .address(a[8:0]),
                  .writedata(wd), .readdata(rdata[4]), .irq(irq[4]));
  lzss_avalon u_lzss (.clk, .rst_n, .chipselect(cs[5]), .write(wr), .read(rd), .address(a[2:0]),
                      .writedata(wd), .readdata(rdata[5]), .irq(irq[5]));
endmodule
