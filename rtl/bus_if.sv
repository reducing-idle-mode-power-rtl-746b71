// bus_if: system bus interface unit, an AMBA APB client.
//
// The document connects the processor to the rest of the terminal through a
// low-speed system bus and names an AMBA client as the typical choice; APB is
// used here. Through it a host loads the program, exchanges samples and
// results with the data memory, and starts and watches the processor.
// Address map (byte addresses, PADDR[19:18] selects the region, PADDR[16:2]
// is the word index inside a memory):
//   0x00000  CTRL      write bit 0 = 1: start (ignored while running)
//   0x00004  START_PC  read/write, word address of the first instruction
//   0x00008  STATUS    read: bit 0 running, bit 1 done
//   0x0000C  CYCLES    read: cycles of the current or last run
//   0x40000+ IMEM      write only, only while stopped (else PSLVERR)
//   0x80000+ DMEM      read/write at any time
// Control registers and instruction-memory writes complete in the access
// phase without wait states. A data-memory access asks for the bus port of
// data_mem and waits (PREADY low) until that port is granted, which happens
// when no SIMD or core access uses the same bank; a read then takes one more
// cycle for the data. The map and wait behaviour are this design's choices.
module bus_if
  import imp_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  // APB
  input  logic          psel,
  input  logic          penable,
  input  logic          pwrite,
  input  logic [19:0]   paddr,
  input  logic [31:0]   pwdata,
  output logic [31:0]   prdata,
  output logic          pready,
  output logic          pslverr,
  // processor side
  output logic          start,
  output logic [AW-1:0] start_pc,
  input  logic          running,
  input  logic          done,
  input  logic [XW-1:0] cycles,
  output logic          imem_we,
  output logic [AW-1:0] imem_addr,
  output logic [31:0]   imem_wdata,
  output dmem_req_t     dmem_req,
  input  logic          dmem_gnt,
  input  logic [XW-1:0] dmem_rdata,
  // event, for observation
  output logic          wait_state
);

  typedef enum logic [1:0] {R_CTRL = 2'd0, R_IMEM = 2'd1, R_DMEM = 2'd2, R_NONE = 2'd3} region_t;

  region_t region;
  logic    access, rd_wait;

  assign region     = region_t'(paddr[19:18]);
  assign access     = psel && penable;
  assign imem_addr  = paddr[AW+1:2];
  assign imem_wdata = pwdata;
  assign imem_we    = access && pwrite && region == R_IMEM && !running;
  assign start      = access && pwrite && region == R_CTRL && paddr[3:2] == 2'd0 && pwdata[0];

  assign dmem_req = '{en: access && region == R_DMEM && !rd_wait, we: pwrite,
                      addr: paddr[AW+1:2], wdata: pwdata};

  logic [31:0] ctrl_rdata;
  always_comb begin
    unique case (paddr[3:2])
      2'd1:    ctrl_rdata = 32'(start_pc);
      2'd2:    ctrl_rdata = {30'd0, done, running};
      2'd3:    ctrl_rdata = cycles;
      default: ctrl_rdata = '0;
    endcase
  end

  always_comb begin
    pready  = 1'b1;
    pslverr = 1'b0;
    prdata  = '0;
    if (region == R_CTRL) begin
      prdata = ctrl_rdata;
    end else if (region == R_IMEM) begin
      pslverr = access && (running || !pwrite);
    end else if (region == R_DMEM) begin
      if (rd_wait)     begin pready = 1'b1; prdata = dmem_rdata; end
      else if (pwrite) pready = dmem_gnt;
      else             pready = 1'b0;
    end else begin
      pslverr = access;
    end
  end

  assign wait_state = access && !pready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      start_pc <= '0; rd_wait <= 1'b0;
    end else begin
      if (access && pwrite && region == R_CTRL && paddr[3:2] == 2'd1) start_pc <= pwdata[AW-1:0];
      rd_wait <= access && region == R_DMEM && !pwrite && !rd_wait && dmem_gnt;
    end
  end

  // APB rules: PENABLE only inside a selected transfer, and the request is
  // held while the slave inserts wait states.
  a_penable : assert property (@(posedge clk) disable iff (!rst_n) penable |-> psel);
  a_hold : assert property (@(posedge clk) disable iff (!rst_n)
    (access && !pready) |=> (psel && penable && $stable(paddr) && $stable(pwrite) && $stable(pwdata)));

endmodule
