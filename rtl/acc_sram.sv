// acc_sram: accumulation memory of a DN layer.
//
// Holds ROWS output rows of up to MAX_WO pixels, each pixel C signed
// accumulations of ACCBITS bits. NP update ports (one per kernel tap)
// read-modify-write a slice of PAR channels (slice grp) at (slot, ox) in one
// clock: rdata is the asynchronous read of the addressed slice and wdata is
// written at the clock edge when en is set. A further read port returns all C
// channels of one pixel, for sending out a finished output row. Distinct
// update ports must address distinct pixels in a clock (the DN layer
// guarantees this). Written as an array; a multi-port memory of this kind is
// built from several single-port macros or registers in silicon.
module acc_sram #(
  parameter int C       = 256,
  parameter int PAR     = 32,
  parameter int ACCBITS = 10,
  parameter int ROWS    = 3,
  parameter int MAX_WO  = 80,
  parameter int NP      = 9,
  localparam int G      = C / PAR,
  localparam int GW     = (G > 1) ? $clog2(G) : 1,
  localparam int SW     = $clog2(ROWS),
  localparam int XW     = $clog2(MAX_WO)
) (
  input  logic                      clk,
  input  logic [GW-1:0]             grp,
  input  logic                      en    [NP],
  input  logic [SW-1:0]             slot  [NP],
  input  logic [XW-1:0]             ox    [NP],
  output logic signed [ACCBITS-1:0] rdata [NP][PAR],
  input  logic signed [ACCBITS-1:0] wdata [NP][PAR],
  input  logic [SW-1:0]             e_slot,
  input  logic [XW-1:0]             e_ox,
  output logic signed [ACCBITS-1:0] e_data [C]
);
  logic signed [ACCBITS-1:0] mem [ROWS][MAX_WO][C];

  always_comb begin
    for (int q = 0; q < NP; q++)
      for (int p = 0; p < PAR; p++)
        rdata[q][p] = mem[slot[q]][ox[q]][int'(grp)*PAR + p];
    for (int c = 0; c < C; c++) e_data[c] = mem[e_slot][e_ox][c];
  end

  always_ff @(posedge clk) begin
    for (int q = 0; q < NP; q++)
      if (en[q])
        for (int p = 0; p < PAR; p++)
          mem[slot[q]][ox[q]][int'(grp)*PAR + p] <= wdata[q][p];
  end
endmodule
