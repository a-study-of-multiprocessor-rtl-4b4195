// pb_model: behavioural model of a PicoBlaze processor running one of the
// programs used with the multiprocessor fabric, for simulation only.
//
// The model reproduces what the fabric sees of a processor: its I/O bus and
// the timing of its instructions. Every instruction takes two clock cycles.
// An OUTPUT drives port_id and out_port for both cycles and write_strobe in
// the second. An INPUT drives port_id for both cycles and read_strobe in
// the second, and captures in_port at the rising edge that ends the second
// cycle. Other instructions only take time. Bus signals change on falling
// edges, so that they are stable around every rising edge. A testbench may
// also call the I/O tasks directly, starting on a falling edge.
//
// The programs are written as tasks that follow the assembly programs of the
// original experiments instruction by instruction, so that polling loops,
// the software multiply and the cycle counts match the real processor:
//   PROG_FIR_SOURCE  send five input samples to the south port, then halt
//   PROG_FIR_STAGE   wait for south, east and diagonal data, then
//                    diagonal += south * east (8-bit shift-add multiply),
//                    forward all three; forever
//   PROG_COUNT_SRC   send K0, K0+4, ... (< KMAX) to port OUT_PORT, testing
//                    the receiver's full flag at port FLAG_PORT first
//   PROG_COUNT_DST   clear the scratchpad, then forever read one byte each
//                    from the west, south, diagonal and east FIFOs (waiting
//                    while empty) and output it on port 0
//   PROG_LINK_PROD   send 0, 1, 2, ... up to 7E into a FIFO, waiting while
//                    it is full
//   PROG_LINK_CONS   wait until the FIFO is full, then move one byte to the
//                    LED port for each poll of a pressed button, while data
//                    is left
//   PROG_SHM_CLIENT  NROUNDS times: request the bus, wait for grant,
//                    increment the shared counter at 0x80, write its own
//                    mailbox byte at 0x81+ID, release the bus, then pause
// The model has no instruction memory and no processor registers beyond
// what each program needs.
module pb_model
  import mc_pkg::*;
#(
  parameter int          PROG      = 0,
  parameter int          ID        = 0,
  parameter logic [39:0] U_VALS    = 40'h03_04_03_02_01,  // sample 0 in the low byte
  parameter logic [7:0]  K0        = 8'h01,
  parameter logic [7:0]  KMAX      = 8'h15,
  parameter logic [7:0]  FLAG_PORT = 8'h08,
  parameter logic [7:0]  OUT_PORT  = 8'h00,
  parameter int          NROUNDS   = 4,
  parameter int          PAUSE     = 3
) (
  input  logic       clk,
  input  logic       rst,
  output pb_io_t     bus,
  input  logic [7:0] in_port
);

  localparam int PROG_NONE       = 0;
  localparam int PROG_FIR_SOURCE = 1;
  localparam int PROG_FIR_STAGE  = 2;
  localparam int PROG_COUNT_SRC  = 3;
  localparam int PROG_COUNT_DST  = 4;
  localparam int PROG_LINK_PROD  = 5;
  localparam int PROG_LINK_CONS  = 6;
  localparam int PROG_SHM_CLIENT = 7;

  // Statistics, read by the testbenches.
  int unsigned n_instr      = 0;  // instructions executed
  int unsigned n_outputs    = 0;  // OUTPUT instructions
  int unsigned n_empty_wait = 0;  // polls that found a FIFO empty
  int unsigned n_full_wait  = 0;  // polls that found a FIFO full
  int unsigned n_grant_wait = 0;  // polls that found no grant
  int unsigned n_rounds     = 0;  // finished loop bodies of the program
  bit          done         = 1'b0;

  initial bus = PB_IDLE;

  // ---- instruction timing -------------------------------------------------

  // Every task starts on a falling edge, at the beginning of an instruction,
  // and returns on the falling edge that begins the next one.

  // n instructions that do not touch the I/O bus
  task automatic instr(input int unsigned n);
    repeat (2 * n) @(negedge clk);
    n_instr += n;
  endtask

  task automatic out(input logic [7:0] port, input logic [7:0] data);
    bus.port_id  = port;
    bus.out_port = data;
    @(negedge clk);
    bus.write_strobe = 1'b1;
    @(negedge clk);
    bus.write_strobe = 1'b0;
    n_instr   += 1;
    n_outputs += 1;
  endtask

  task automatic inp(input logic [7:0] port, output logic [7:0] data);
    bus.port_id = port;
    @(negedge clk);
    bus.read_strobe = 1'b1;
    // nothing in the fabric changes before the next rising edge
    data = in_port;
    @(negedge clk);
    bus.read_strobe = 1'b0;
    n_instr += 1;
  endtask

  // stop for good; waits on an event that never fires, so that a halted
  // model costs the simulator nothing
  event never;
  task automatic halt();
    @(never);
  endtask

  // ---- programs -------------------------------------------------------------

  // Wait until the FIFO whose flags are at flag_port is not empty
  // (INPUT, AND, COMPARE, JUMP Z per poll).
  task automatic wait_not_empty(input logic [7:0] flag_port);
    logic [7:0] f;
    forever begin
      inp(flag_port, f);
      instr(3);
      if (f[0] == 1'b0) break;
      n_empty_wait++;
    end
  endtask

  task automatic fir_source();
    for (int t = 0; t < 5; t++) begin
      instr(1);                                  // LOAD in_s, value
      out(8'h03, U_VALS[8*t +: 8]);              // OUTPUT in_s, o_sou
      n_rounds++;
    end
    done = 1'b1;
    halt();                                      // forever: JUMP forever
  endtask

  task automatic fir_stage();
    logic [7:0] in_s, in_e, in_d, prod;
    forever begin
      wait_not_empty(8'h05);                     // check_s
      wait_not_empty(8'h07);                     // check_e
      wait_not_empty(8'h06);                     // check_d
      inp(8'h01, in_s);
      inp(8'h03, in_e);
      inp(8'h02, in_d);
      instr(2);                                  // LOAD s3, LOAD s4
      instr(3);                                  // LOAD s6, LOAD s5, LOAD i
      prod = 8'h00;
      for (int b = 0; b < 8; b++) begin
        // SR0, JUMP NC, [ADD], SRA, SRA, SUB, JUMP NZ
        instr(in_e[b] ? 7 : 6);
      end
      prod = 8'(in_s * in_e);                    // low byte of the 16-bit product
      in_d = in_d + prod;                        // ADD in_d, s6
      instr(1);
      out(8'h03, in_s);                          // OUTPUT in_s, o_sou
      out(8'h01, in_e);                          // OUTPUT in_e, o_eas
      out(8'h02, in_d);                          // OUTPUT in_d, o_dia
      instr(3);                                  // LOAD, LOAD, JUMP main
      n_rounds++;
    end
  endtask

  // write_to_fifo subroutine of the counting and button programs:
  // returns 1 if the byte was sent, 0 if the receiver was full.
  task automatic write_to_fifo(input logic [7:0] flag_port, input logic [7:0] port,
                               input logic [7:0] data, output bit ok);
    logic [7:0] f;
    inp(flag_port, f);                           // INPUT fdata, flags
    instr(3);                                    // AND, COMPARE, JUMP NZ
    if (f[1]) begin
      instr(2);                                  // LOAD success,00; RETURN
      n_full_wait++;
      ok = 1'b0;
    end else begin
      out(port, data);                           // OUTPUT dout, dout_port
      instr(2);                                  // LOAD success,01; RETURN
      ok = 1'b1;
    end
  endtask

  task automatic count_src(input logic [7:0] k0, input logic [7:0] kmax, input logic [7:0] step);
    logic [7:0] k;
    bit ok;
    k = k0;
    instr(1);                                    // LOAD k, K0
    forever begin
      instr(1);                                  // loop_body: LOAD dout, k
      do begin
        instr(1);                                // CALL write_to_fifo
        write_to_fifo(FLAG_PORT, OUT_PORT, k, ok);
        instr(2);                                // COMPARE success; JUMP Z fail
      end while (!ok);
      n_rounds++;
      k = k + step;
      instr(3);                                  // ADD, COMPARE, JUMP Z forever
      if (k == kmax) break;
      instr(1);                                  // JUMP loop_body
    end
    done = 1'b1;
    halt();
  endtask

  task automatic count_dst();
    logic [7:0] d;
    instr(2 + 64 * 3);                           // clear the 64-byte scratchpad
    forever begin
      wait_not_empty(8'h04); inp(8'h00, d); out(8'h00, d);   // west
      wait_not_empty(8'h05); inp(8'h01, d); out(8'h00, d);   // south
      wait_not_empty(8'h06); inp(8'h02, d); out(8'h00, d);   // diagonal
      wait_not_empty(8'h07); inp(8'h03, d); out(8'h00, d);   // east
      instr(1);                                              // JUMP wes
      n_rounds++;
    end
  endtask

  task automatic link_cons();
    logic [7:0] f, b, d;
    // full_test: wait until the producer has filled the FIFO
    forever begin
      inp(8'h01, f);
      instr(3);
      if (f[1]) break;
      instr(1);
      n_empty_wait++;
    end
    forever begin
      // btn_chk: wait for the button
      forever begin
        inp(8'h04, b);
        instr(2);
        if (b == 8'h01) break;
        instr(1);
      end
      // input_fifo: move one byte to the LEDs
      inp(8'h02, d);
      out(8'h06, d);
      instr(1);
      n_rounds++;
      // empty_test: back to btn_chk while data is left
      forever begin
        inp(8'h01, f);
        instr(3);
        if (!f[0]) break;
        instr(1);
        n_empty_wait++;
      end
    end
  endtask

  task automatic shm_client();
    logic [7:0] g, c;
    for (int r = 0; r < NROUNDS; r++) begin
      instr(1);                                  // LOAD s0, 01
      out(8'h00, 8'h01);                         // request the bus
      forever begin
        inp(8'h00, g);                           // poll grant
        instr(2);
        if (g[0]) break;
        n_grant_wait++;
      end
      inp(8'h80, c);                             // read shared counter
      instr(1);                                  // ADD c, 01
      out(8'h80, c + 8'h01);                     // write it back
      out(8'h81 + 8'(ID), 8'(16 * ID + r));      // own mailbox byte
      instr(1);                                  // LOAD s0, 00
      out(8'h00, 8'h00);                         // release the bus
      instr(PAUSE);
      n_rounds++;
    end
    done = 1'b1;
    halt();
  endtask

  initial begin
    @(negedge clk);
    while (rst) @(negedge clk);
    case (PROG)
      PROG_FIR_SOURCE: fir_source();
      PROG_FIR_STAGE:  fir_stage();
      PROG_COUNT_SRC:  count_src(K0, KMAX, 8'h04);
      PROG_COUNT_DST:  count_dst();
      PROG_LINK_PROD:  count_src(8'h00, 8'h7F, 8'h01);
      PROG_LINK_CONS:  link_cons();
      PROG_SHM_CLIENT: shm_client();
      default:         halt();
    endcase
  end

endmodule
