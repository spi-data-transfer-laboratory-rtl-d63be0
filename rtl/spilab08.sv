// SPI data transfer lab: a 4-bit SPI master and a 4-bit SPI slave on one
// board, wired to each other, each with its own four slide switches and
// four LEDs.
//
// Buttons (debounced at 100 Hz):
//   BTN0  master reads its switches SW7..SW4 and sends them to the slave
//   BTN1  slave reads its switches SW3..SW0 and offers them on MISO
//   BTN3  master reads the slave's word over MISO
//   BTN2  clears both registers and all requests
// LD7..LD4 show the master's register, LD3..LD0 the slave's. A button sets
// a request that stays set until BTN2, so the chosen transfer repeats back
// to back and the LEDs follow the switches while it runs. To move the
// slave's word to the master, press BTN1 first and then BTN3; pressing
// BTN1 makes the slave stop listening to SS, so a master -> slave transfer
// needs a clear first.
//
// Clocks: the board clock CCLK is divided by 2*CLK1_HALF for the SPI state
// machines (SCLK runs at half of that) and by 2*CLK100_HALF for the button
// debouncers. The divisors are the lab's; with a 50 MHz CCLK they give
// 10 Hz and 100 Hz. The divided clocks are plain register outputs used as
// clocks, as on the lab board; the button levels cross from the 100 Hz
// domain into the slow domain unsynchronised, which the controllers
// tolerate because a press lasts many slow cycles and a late sample only
// delays the request by one cycle.
//
// The block structure and all wiring follow the lab's top level. SS, SCLK,
// MOSI and MISO stay internal; the master and slave share the slow clock.
module spilab08 #(
  parameter int unsigned CLK1_HALF   = 2500000,
  parameter int unsigned CLK100_HALF = 250000
) (
  input  logic CCLK,
  input  logic BTN0, BTN1, BTN2, BTN3,
  input  logic SW0, SW1, SW2, SW3, SW4, SW5, SW6, SW7,
  output logic LD7, LD6, LD5, LD4, LD3, LD2, LD1, LD0
);
  import spilab_pkg::DATA_W;

  logic clk1, clk100;
  logic pbbtn0, pbbtn1, pbbtn2, pbbtn3;
  logic swmread, swsread, mrdslv;
  logic sclk, mosi, ss, miso;
  logic [DATA_W-1:0] swmdata, mled, swsdata, sled;

  assign swmdata = {SW7, SW6, SW5, SW4};
  assign swsdata = {SW3, SW2, SW1, SW0};
  assign {LD7, LD6, LD5, LD4} = mled;
  assign {LD3, LD2, LD1, LD0} = sled;

  clock #(.HALF_PERIOD(CLK1_HALF))   u_clk1   (.clk_in(CCLK), .clk_out(clk1));
  clock #(.HALF_PERIOD(CLK100_HALF)) u_clk100 (.clk_in(CCLK), .clk_out(clk100));

  pbdebounce u_pb0 (.clk(clk100), .pb(BTN0), .pbreg(pbbtn0));
  pbdebounce u_pb1 (.clk(clk100), .pb(BTN1), .pbreg(pbbtn1));
  pbdebounce u_pb2 (.clk(clk100), .pb(BTN2), .pbreg(pbbtn2));
  pbdebounce u_pb3 (.clk(clk100), .pb(BTN3), .pbreg(pbbtn3));

  spimcntrl u_mcntrl (
    .spimcclk(clk1), .mcrd(pbbtn0), .mcrst(pbbtn2), .mcrdslv(pbbtn3),
    .rdmdat(swmread), .rdslave(mrdslv)
  );

  spimdtpth #(.W(DATA_W)) u_mdtpth (
    .spimdclk(clk1), .mrds(swmread), .mdrst(pbbtn2), .rdslv(mrdslv),
    .sw(swmdata), .swled(mled),
    .sclk(sclk), .mosi(mosi), .ss(ss), .miso(miso)
  );

  spiscntrl u_scntrl (
    .spiscclk(clk1), .pbtn(pbbtn1), .scrst(pbbtn2), .rdsdat(swsread)
  );

  spisdtpth #(.W(DATA_W)) u_sdtpth (
    .spisdclk(clk1), .srds(swsread), .sdrst(pbbtn2),
    .sw(swsdata), .swled(sled),
    .sclk(sclk), .mosi(mosi), .ss(ss), .miso(miso)
  );
endmodule
