// wavetable_bram: the wavetable store, 16 slots x 2048 samples x 16 bits
// (64 KB), as a dual-port synchronous memory.
//
// Port A belongs to the host bus: it writes samples while the wavetables are
// loaded and reads them back for the host. Port B is the read-only playback
// port used by the oscillator. The word address is {slot[3:0], index[10:0]},
// so slot s occupies words s*2048 .. s*2048+2047 (byte offsets s*0x1000 on
// the host bus).
//
// Timing: both ports read synchronously with one cycle of latency: the data
// for an address presented at clock edge k is on the rdata output after edge
// k. A port-A read of the word written in the same cycle returns the old word
// (read-first). The memory has no reset; the host loads it before playback.
//
// The size and the dual-port arrangement (write port for the host, read port
// for playback) follow the design description; the host read-back on port A
// and the one-cycle read latency are this design's choices.
module wavetable_bram #(
  parameter int unsigned DEPTH  = wavesurfer_pkg::NUM_TABLES * wavesurfer_pkg::TABLE_DEPTH,
  parameter int unsigned DATA_W = wavesurfer_pkg::SAMPLE_W,
  parameter int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  // Port A: host read/write
  input  logic              a_we,
  input  logic [ADDR_W-1:0] a_addr,
  input  logic [DATA_W-1:0] a_wdata,
  output logic [DATA_W-1:0] a_rdata,
  // Port B: playback read
  input  logic [ADDR_W-1:0] b_addr,
  output logic [DATA_W-1:0] b_rdata
);

  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_we) mem[a_addr] <= a_wdata;
    a_rdata <= mem[a_addr];
  end

  always_ff @(posedge clk) begin
    b_rdata <= mem[b_addr];
  end

endmodule
