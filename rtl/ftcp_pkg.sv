// Shared types and constants of the fault tolerant co-processing support system.
//
// The support FPGA talks to the host over an 8-bit PC104/ISA bus, to an Intel
// 32 Mbit (2M x 16) flash, and to the configuration (SelectMap) ports of two
// FPGAs. All flash users share one command bus, described here by the
// flash_req_t / flash_rsp_t pair:
//   * a requester drives req.valid for one cycle, while rsp.busy is low;
//   * rsp.busy is high from the next cycle until the command has finished;
//   * a read ends with rsp.rvalid high for one cycle, rsp.rdata holding the word
//     (rvalid comes in the last busy cycle).
// The host command bytes and acknowledge bytes below follow the documented
// command set; the codes marked "assumed" are not documented and were chosen
// from the unused values.
package ftcp_pkg;

  localparam int FLASH_AW = 21;   // Intel flash address width (2M words)
  localparam int FLASH_DW = 16;   // flash word width

  // Flash block map: 32K-word main blocks (start = multiple of 0x8000) and
  // 4K-word boot blocks in the last 32K words of the device.
  localparam logic [FLASH_AW-1:0] BOOT_BASE = 21'h1F8000;

  typedef enum logic [2:0] {
    FCMD_READ   = 3'd0,
    FCMD_WRITE  = 3'd1,
    FCMD_LOCK   = 3'd2,
    FCMD_UNLOCK = 3'd3,
    FCMD_ERASE  = 3'd4
  } flash_cmd_e;

  typedef struct packed {
    logic                valid;   // one-cycle command strobe
    flash_cmd_e          cmd;
    logic [FLASH_AW-1:0] addr;
    logic [FLASH_DW-1:0] wdata;
    logic                cached;  // read through the CRC-verified buffer (logical address)
  } flash_req_t;

  typedef struct packed {
    logic                busy;
    logic                rvalid;
    logic [FLASH_DW-1:0] rdata;
  } flash_rsp_t;

  localparam flash_req_t FLASH_REQ_IDLE = '{valid: 1'b0, cmd: FCMD_READ, addr: '0, wdata: '0, cached: 1'b0};

  // Intel flash bus commands (standard Intel command user interface codes).
  localparam logic [7:0] ICMD_READ_ARRAY   = 8'hFF;
  localparam logic [7:0] ICMD_PROGRAM      = 8'h40;
  localparam logic [7:0] ICMD_ERASE_SETUP  = 8'h20;
  localparam logic [7:0] ICMD_CONFIRM      = 8'hD0;  // erase confirm / unlock
  localparam logic [7:0] ICMD_LOCK_SETUP   = 8'h60;
  localparam logic [7:0] ICMD_LOCK         = 8'h01;

  // Host commands of the flash control module.
  localparam logic [7:0] FC_READ      = 8'h00;
  localparam logic [7:0] FC_WRITE     = 8'h01;
  localparam logic [7:0] FC_LOCK      = 8'h02;  // assumed
  localparam logic [7:0] FC_UNLOCK    = 8'h03;  // assumed
  localparam logic [7:0] FC_ERASE     = 8'h04;  // assumed
  localparam logic [7:0] FC_LOAD_ADDR = 8'h07;
  localparam logic [7:0] FC_INC_ADDR  = 8'h08;
  localparam logic [7:0] FC_ADDR2BUS  = 8'h09;

  // Host commands of the SelectMap interface.
  localparam logic [7:0] SM_LOAD_START  = 8'h0A;
  localparam logic [7:0] SM_LOAD_STOP   = 8'h01;
  localparam logic [7:0] SM_PROG_FLASH  = 8'h02;
  localparam logic [7:0] SM_LOAD_COUNT  = 8'h03;
  localparam logic [7:0] SM_PROG_BUS    = 8'h04;
  localparam logic [7:0] SM_SCRUB       = 8'h05;
  localparam logic [7:0] SM_ABORT       = 8'h08;
  localparam logic [7:0] SM_STOP        = 8'h0E;
  // Acknowledges returned to the host.
  localparam logic [7:0] ACK_BEGIN_FLASH = 8'hBF;
  localparam logic [7:0] ACK_END_FLASH   = 8'hEF;
  localparam logic [7:0] ACK_BEGIN_BUS   = 8'hBB;
  localparam logic [7:0] ACK_END_BUS     = 8'hEB;
  localparam logic [7:0] ACK_SCRUB_ON    = 8'hB5;  // assumed
  localparam logic [7:0] ACK_SCRUB_OFF   = 8'hE5;  // assumed

  // True where a block-level command (lock, unlock, erase) may be issued.
  function automatic logic is_block_start(input logic [FLASH_AW-1:0] a);
    if (a >= BOOT_BASE) return a[11:0] == 12'h000;
    return a[14:0] == 15'h0000;
  endfunction

endpackage
