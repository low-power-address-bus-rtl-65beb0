// addr_bus_codec_top: the three low-power address bus links side by side.
//
// Each link is an encoder on the CPU side, the encoded bus with its extra
// control lines, and a decoder on the memory side that gives back the
// original address one clock later (two clocks from CPU to memory):
//
//   * instruction address bus ("4 Buses" system): T0 DAT, one INC-DAT line
//   * data address bus ("4 Buses" system): T0_BI_1/S/RW, one INCV line plus
//     the conventional Read/Write line
//   * instruction/data mixed address bus ("2 Buses" system): I/D selector,
//     T0 DAT for instructions and Stride-Table for data, one shared
//     INC-DAT/ST line
//
// The encoded buses and control lines are brought out so that their
// transitions can be counted; these lines are what the codes make quieter.
// The CPU and the memories are outside this design: their addresses enter
// and leave through the ports. *_kind tells how each encoder sent its last
// address and is for observation only.
//
// Defaults follow the thesis's evaluated configurations: 32-bit
// addresses, a 32-entry DAT on the instruction bus, endurance 1 on the data
// bus and a 128-entry Stride-Table on the mixed bus. The mixed bus's DAT
// size (32) and ST_INV = 0 are this design's choices.
//
// XOR_LINK = 1 puts a transition-signalling stage (xor_link_encoder /
// xor_link_decoder) on the address lines of all three links, behind the
// encoders and in front of the decoders, as the thesis suggests for buses
// that already use one. The *_bus ports then show the XOR-coded lines, the
// control lines are delayed by the same clock, and the CPU-to-memory latency
// becomes three clocks. The default, 0, is the thesis's main configuration.
module addr_bus_codec_top
  import addr_codec_pkg::*;
#(
  parameter int unsigned AW          = 32,
  parameter int unsigned IDAT_DEPTH  = 32,
  parameter int unsigned ENDURANCE   = 1,
  parameter int unsigned MDAT_DEPTH  = 32,
  parameter int unsigned ST_DEPTH    = 128,
  parameter bit          ST_INV      = 1'b0,
  parameter bit          XOR_LINK    = 1'b0
) (
  input  logic          clk,
  input  logic          rst_n,
  // instruction address bus
  input  logic          i_valid,
  input  logic [AW-1:0] i_addr,
  output logic [AW-1:0] i_bus,
  output logic          i_incdat,
  output xfer_kind_e    i_kind,
  output logic          i_mem_valid,
  output logic [AW-1:0] i_mem_addr,
  // data address bus
  input  logic          d_valid,
  input  logic [AW-1:0] d_addr,
  input  logic          d_read,
  output logic [AW-1:0] d_bus,
  output logic          d_incv,
  output xfer_kind_e    d_kind,
  output logic          d_mem_valid,
  output logic [AW-1:0] d_mem_addr,
  output logic          d_mem_read,
  // instruction/data mixed address bus
  input  logic          m_valid,
  input  logic [AW-1:0] m_addr,
  input  logic          m_is_data,
  input  logic          m_read,
  output logic [AW-1:0] m_bus,
  output logic          m_ctl,
  output logic          m_isel,
  output xfer_kind_e    m_kind,
  output logic          m_mem_valid,
  output logic [AW-1:0] m_mem_addr,
  output logic          m_mem_is_data,
  output logic          m_mem_read
);
  // Encoder side (e*) and decoder side (r*) of each link; they are the same
  // wires unless the XOR stage sits between them.
  logic          ie_valid, ir_valid, ie_incdat, ir_incdat;
  logic [AW-1:0] ie_bus, ir_bus;
  logic          de_valid, dr_valid, de_incv, dr_incv, de_read, dr_read;
  logic [AW-1:0] de_bus, dr_bus;
  logic          me_valid, mr_valid, me_ctl, mr_ctl, me_isel, mr_isel, me_read, mr_read;
  logic [AW-1:0] me_bus, mr_bus;

  t0dat_encoder #(.AW(AW), .DAT_DEPTH(IDAT_DEPTH)) u_ienc (
    .clk, .rst_n, .in_valid(i_valid), .in_addr(i_addr),
    .bus(ie_bus), .inc_dat(ie_incdat), .bus_valid(ie_valid), .kind(i_kind)
  );
  t0dat_decoder #(.AW(AW), .DAT_DEPTH(IDAT_DEPTH)) u_idec (
    .clk, .rst_n, .bus_valid(ir_valid), .bus(ir_bus), .inc_dat(ir_incdat),
    .out_valid(i_mem_valid), .out_addr(i_mem_addr)
  );

  t0bi1srw_encoder #(.AW(AW), .ENDURANCE(ENDURANCE)) u_denc (
    .clk, .rst_n, .in_valid(d_valid), .in_addr(d_addr), .in_read(d_read),
    .bus(de_bus), .incv(de_incv), .bus_valid(de_valid), .bus_read(de_read),
    .kind(d_kind)
  );
  t0bi1srw_decoder #(.AW(AW), .ENDURANCE(ENDURANCE)) u_ddec (
    .clk, .rst_n, .bus_valid(dr_valid), .bus(dr_bus), .incv(dr_incv),
    .bus_read(dr_read),
    .out_valid(d_mem_valid), .out_addr(d_mem_addr), .out_read(d_mem_read)
  );

  idst_encoder #(.AW(AW), .DAT_DEPTH(MDAT_DEPTH), .ST_DEPTH(ST_DEPTH), .ST_INV(ST_INV)) u_menc (
    .clk, .rst_n, .in_valid(m_valid), .in_addr(m_addr), .in_is_data(m_is_data),
    .in_read(m_read),
    .bus(me_bus), .ctl(me_ctl), .isel(me_isel), .bus_valid(me_valid),
    .bus_read(me_read), .kind(m_kind)
  );
  idst_decoder #(.AW(AW), .DAT_DEPTH(MDAT_DEPTH), .ST_DEPTH(ST_DEPTH), .ST_INV(ST_INV)) u_mdec (
    .clk, .rst_n, .bus_valid(mr_valid), .bus(mr_bus), .ctl(mr_ctl), .isel(mr_isel),
    .bus_read(mr_read),
    .out_valid(m_mem_valid), .out_addr(m_mem_addr), .out_is_data(m_mem_is_data),
    .out_read(m_mem_read)
  );

  if (XOR_LINK) begin : g_xor
    logic il_valid, dl_valid, ml_valid;

    xor_link_encoder #(.W(AW), .CW(1)) u_ixe (
      .clk, .rst_n, .in_valid(ie_valid), .in_bus(ie_bus), .in_ctl(ie_incdat),
      .out_valid(il_valid), .out_line(i_bus), .out_ctl(i_incdat)
    );
    xor_link_decoder #(.W(AW)) u_ixd (
      .clk, .rst_n, .in_valid(il_valid), .in_line(i_bus), .out_bus(ir_bus)
    );
    assign ir_valid  = il_valid;
    assign ir_incdat = i_incdat;

    // Control lines: {INCV, Read/Write}; Read/Write resets to read.
    xor_link_encoder #(.W(AW), .CW(2), .CTL_INIT(2'b01)) u_dxe (
      .clk, .rst_n, .in_valid(de_valid), .in_bus(de_bus), .in_ctl({de_incv, de_read}),
      .out_valid(dl_valid), .out_line(d_bus), .out_ctl({d_incv, dr_read})
    );
    xor_link_decoder #(.W(AW)) u_dxd (
      .clk, .rst_n, .in_valid(dl_valid), .in_line(d_bus), .out_bus(dr_bus)
    );
    assign dr_valid = dl_valid;
    assign dr_incv  = d_incv;

    // Control lines: {INC-DAT/ST, I/D selector, Read/Write}; the selector
    // resets to instruction and Read/Write to read.
    xor_link_encoder #(.W(AW), .CW(3), .CTL_INIT(3'b011)) u_mxe (
      .clk, .rst_n, .in_valid(me_valid), .in_bus(me_bus),
      .in_ctl({me_ctl, me_isel, me_read}),
      .out_valid(ml_valid), .out_line(m_bus), .out_ctl({m_ctl, m_isel, mr_read})
    );
    xor_link_decoder #(.W(AW)) u_mxd (
      .clk, .rst_n, .in_valid(ml_valid), .in_line(m_bus), .out_bus(mr_bus)
    );
    assign mr_valid = ml_valid;
    assign mr_ctl   = m_ctl;
    assign mr_isel  = m_isel;
  end else begin : g_direct
    assign i_bus    = ie_bus;
    assign i_incdat = ie_incdat;
    assign ir_valid = ie_valid;
    assign ir_bus   = ie_bus;
    assign ir_incdat = ie_incdat;

    assign d_bus    = de_bus;
    assign d_incv   = de_incv;
    assign dr_valid = de_valid;
    assign dr_bus   = de_bus;
    assign dr_incv  = de_incv;
    assign dr_read  = de_read;

    assign m_bus    = me_bus;
    assign m_ctl    = me_ctl;
    assign m_isel   = me_isel;
    assign mr_valid = me_valid;
    assign mr_bus   = me_bus;
    assign mr_ctl   = me_ctl;
    assign mr_isel  = me_isel;
    assign mr_read  = me_read;
  end

endmodule
