// hera_top: a complete HERA processor, the core with its two memories.
//
// The core (hera_core) fetches from an instruction memory and does LOAD,
// STORE, CAL and RETURN on a separate data memory, both 2^AW words of 16 bits
// (AW = 16 gives the architecture's full 64 Ki-word address space). Keeping
// program and data apart is this design's choice; the architecture only fixes
// the data address space.
//
// A host port loads programs and data and reads results: while host_en is
// high it owns both memories (host_sel = 0 instruction memory, 1 data
// memory), writing host_wdata when host_we is high and returning the word at
// host_addr on host_rdata one cycle later. The host may use the port only
// while the core is held in reset or has halted (checked by an assertion).
// Releasing rst_n starts execution at address 0. The debug port reads any
// register combinationally.
module hera_top
  import hera_pkg::*;
#(
  parameter int unsigned AW = 16
) (
  input  logic    clk,
  input  logic    rst_n,
  // host access to the memories
  input  logic    host_en,
  input  logic    host_sel,
  input  logic    host_we,
  input  word_t   host_addr,
  input  word_t   host_wdata,
  output word_t   host_rdata,
  // observation
  input  regnum_t dbg_ra,
  output word_t   dbg_rd,
  output word_t   pc,
  output flags_t  flags,
  output logic    halted,
  output logic    retire,
  output logic    unimpl
);

  word_t imem_addr, imem_rdata;
  word_t dmem_addr, dmem_wdata, dmem_rdata;
  logic  dmem_we;

  logic [AW-1:0] im_a, dm_a;
  logic          im_we, dm_we;
  word_t         dm_wd;
  logic          sel_q;

  hera_core u_core (
    .clk, .rst_n,
    .imem_addr, .imem_rdata,
    .dmem_addr, .dmem_we, .dmem_wdata, .dmem_rdata,
    .dbg_ra, .dbg_rd, .pc, .flags, .halted, .retire, .unimpl
  );

  always_comb begin
    if (host_en) begin
      im_a  = AW'(host_addr);
      im_we = host_we && !host_sel;
      dm_a  = AW'(host_addr);
      dm_we = host_we && host_sel;
      dm_wd = host_wdata;
    end else begin
      im_a  = AW'(imem_addr);
      im_we = 1'b0;
      dm_a  = AW'(dmem_addr);
      dm_we = dmem_we;
      dm_wd = dmem_wdata;
    end
  end

  hera_mem #(.AW(AW), .DW(16)) u_imem (
    .clk, .addr(im_a), .we(im_we), .wdata(host_wdata), .rdata(imem_rdata)
  );

  hera_mem #(.AW(AW), .DW(16)) u_dmem (
    .clk, .addr(dm_a), .we(dm_we), .wdata(dm_wd), .rdata(dmem_rdata)
  );

  always_ff @(posedge clk) sel_q <= host_sel;
  assign host_rdata = sel_q ? dmem_rdata : imem_rdata;

  a_host_only_when_idle: assert property (@(posedge clk) host_en |-> (!rst_n || halted));

endmodule
