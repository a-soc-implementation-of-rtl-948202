// frodo_pl_top -- programmable-logic half of a hardware/software FrodoKEM-640 on a
// processor-plus-FPGA SoC. The processor keeps the FrodoKEM software and hands the
// three most expensive kernels to the fabric: AS <- A x S (key generation), S'A <-
// S' x A (encapsulation and decapsulation) and SHAKE128. The additions of E and E'
// stay in software.
//
// Everything is reached through one AXI4-Lite slave (32-bit data, 19-bit byte
// address). Word address bits 16:13 select a region, bits 12:0 the offset in it:
//   0  registers   0 CTRL (write 1 to bit 0/1/2 to start AS / S'A / SHAKE)
//                  1 STATUS (bits 2:0 busy of AS, S'A, SHAKE; bits 10:8 done since
//                    that unit was last started)
//                  2 AS_BLK (row batch 0..159)   3 SA_BLK (bits 7:0 batch, bit 8 half)
//                  4 SHAKE_MSG_LEN (bytes)        5 SHAKE_OUT_LEN (bytes)
//                  6 TIMER_CTRL (bit 0 run, bit 1 clear)  7 TIMER (cycles)
//   1  AS unit, A rows      offset = 512*row + word (row 0..3, word 0..319)
//   2  AS unit, S           offset = 320*column + word (0..2559)
//   3  AS unit, result      offset = 8*row + column (read only, row 0..639)
//   4  S'A unit, A rows     offset = 512*row + word
//   5  S'A unit, S' half    offset = 1024*buffer + word (buffer 0..1, word 0..639)
//   6  S'A unit, result     offset = 640*row + column (read only, 0..5119)
//   7  SHAKE system BRAM    offset = 32-bit word 0..5165
// Register and memory reads return two clocks after the local read strobe. The
// host must not touch a unit's memories while that unit is busy. The region
// split, register map and status bits are chosen here; the units and their
// memories follow the original architecture.
module frodo_pl_top
  import frodo_pkg::*;
#(
  parameter int unsigned ADDR_W = 19
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ADDR_W-1:0] s_awaddr,
  input  logic              s_awvalid,
  output logic              s_awready,
  input  logic [31:0]       s_wdata,
  input  logic [3:0]        s_wstrb,
  input  logic              s_wvalid,
  output logic              s_wready,
  output logic [1:0]        s_bresp,
  output logic              s_bvalid,
  input  logic              s_bready,
  input  logic [ADDR_W-1:0] s_araddr,
  input  logic              s_arvalid,
  output logic              s_arready,
  output logic [31:0]       s_rdata,
  output logic [1:0]        s_rresp,
  output logic              s_rvalid,
  input  logic              s_rready
);

  localparam int unsigned WA_W = ADDR_W - 2;

  typedef enum logic [3:0] {
    R_REGS = 4'd0, R_AS_A = 4'd1, R_AS_S = 4'd2, R_AS_R = 4'd3,
    R_SA_A = 4'd4, R_SA_SP = 4'd5, R_SA_R = 4'd6, R_SHAKE = 4'd7
  } region_e;

  logic            bus_we, bus_re;
  logic [WA_W-1:0] bus_addr;
  word_t           bus_wdata, bus_rdata;

  axi_lite_slave #(.ADDR_W(ADDR_W), .RD_LAT(2)) u_axi (
    .clk, .rst_n,
    .s_awaddr, .s_awvalid, .s_awready, .s_wdata, .s_wstrb, .s_wvalid, .s_wready,
    .s_bresp, .s_bvalid, .s_bready, .s_araddr, .s_arvalid, .s_arready,
    .s_rdata, .s_rresp, .s_rvalid, .s_rready,
    .bus_we, .bus_re, .bus_addr, .bus_wdata, .bus_rdata);

  region_e     region;
  logic [12:0] off;
  assign region = region_e'(bus_addr[16:13]);
  assign off    = bus_addr[12:0];

  // ---------------- registers ----------------
  logic [7:0]  as_blk, sa_blk;
  logic        sa_half;
  logic [15:0] msg_len, out_len;
  logic        tmr_run, tmr_clr;
  logic [31:0] tmr_count;
  logic        as_start, sa_start, sh_start;
  logic        as_busy, sa_busy, sh_busy, as_done, sa_done, sh_done;
  logic [2:0]  done_flags;
  logic        reg_wr;

  assign reg_wr   = bus_we && region == R_REGS;
  assign as_start = reg_wr && off == 13'd0 && bus_wdata[0];
  assign sa_start = reg_wr && off == 13'd0 && bus_wdata[1];
  assign sh_start = reg_wr && off == 13'd0 && bus_wdata[2];
  assign tmr_clr  = reg_wr && off == 13'd6 && bus_wdata[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      as_blk <= '0; sa_blk <= '0; sa_half <= 1'b0; msg_len <= '0; out_len <= '0;
      tmr_run <= 1'b0; done_flags <= '0;
    end else begin
      if (reg_wr) begin
        unique case (off)
          13'd2: as_blk <= bus_wdata[7:0];
          13'd3: begin sa_blk <= bus_wdata[7:0]; sa_half <= bus_wdata[8]; end
          13'd4: msg_len <= bus_wdata[15:0];
          13'd5: out_len <= bus_wdata[15:0];
          13'd6: tmr_run <= bus_wdata[0];
          default: ;
        endcase
      end
      if (as_start) done_flags[0] <= 1'b0; else if (as_done) done_flags[0] <= 1'b1;
      if (sa_start) done_flags[1] <= 1'b0; else if (sa_done) done_flags[1] <= 1'b1;
      if (sh_start) done_flags[2] <= 1'b0; else if (sh_done) done_flags[2] <= 1'b1;
    end
  end

  pl_timer #(.WIDTH(32)) u_timer (.clk, .rst_n, .clr(tmr_clr), .run(tmr_run), .count(tmr_count));

  // ---------------- AS <- A x S ----------------
  entry_t as_rdata;
  as_unit u_as (
    .clk, .rst_n,
    .a_we(bus_we && region == R_AS_A), .a_bank(off[10:9]), .a_addr(off[8:0]), .a_wdata(bus_wdata),
    .s_we(bus_we && region == R_AS_S), .s_addr(off[11:0]), .s_wdata(bus_wdata),
    .start(as_start), .blk(as_blk), .busy(as_busy), .done(as_done),
    .r_re(bus_re && region == R_AS_R), .r_row(off[12:3]), .r_col(off[2:0]), .r_data(as_rdata));

  // ---------------- S'A <- S' x A ----------------
  entry_t sa_rdata;
  sa_unit u_sa (
    .clk, .rst_n,
    .a_we(bus_we && region == R_SA_A), .a_bank(off[10:9]), .a_addr(off[8:0]), .a_wdata(bus_wdata),
    .sp_we(bus_we && region == R_SA_SP), .sp_bank(off[10]), .sp_addr(off[9:0]), .sp_wdata(bus_wdata),
    .start(sa_start), .blk(sa_blk), .half(sa_half), .busy(sa_busy), .done(sa_done),
    .r_re(bus_re && region == R_SA_R), .r_idx(off[12:0]), .r_data(sa_rdata));

  // ---------------- SHAKE128 ----------------
  word_t sh_rdata;
  shake_unit u_shake (
    .clk, .rst_n,
    .h_we(bus_we && region == R_SHAKE), .h_addr(off[12:0]), .h_wdata(bus_wdata),
    .h_re(bus_re && region == R_SHAKE), .h_rdata(sh_rdata),
    .start(sh_start), .msg_len, .out_len, .busy(sh_busy), .done(sh_done));

  // ---------------- read data ----------------
  region_e rd_region;
  word_t   reg_rdata;

  always_ff @(posedge clk) begin
    if (bus_re) begin
      rd_region <= region;
      unique case (off)
        13'd1:   reg_rdata <= {21'd0, done_flags, 5'd0, sh_busy, sa_busy, as_busy};
        13'd2:   reg_rdata <= {24'd0, as_blk};
        13'd3:   reg_rdata <= {23'd0, sa_half, sa_blk};
        13'd4:   reg_rdata <= {16'd0, msg_len};
        13'd5:   reg_rdata <= {16'd0, out_len};
        13'd6:   reg_rdata <= {31'd0, tmr_run};
        13'd7:   reg_rdata <= tmr_count;
        default: reg_rdata <= '0;
      endcase
    end
    unique case (rd_region)
      R_REGS:  bus_rdata <= reg_rdata;
      R_AS_R:  bus_rdata <= {16'd0, as_rdata};
      R_SA_R:  bus_rdata <= {16'd0, sa_rdata};
      R_SHAKE: bus_rdata <= sh_rdata;
      default: bus_rdata <= '0;
    endcase
  end

endmodule
