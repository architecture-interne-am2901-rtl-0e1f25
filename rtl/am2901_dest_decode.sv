// am2901_dest_decode: decoder of the destination field I[8:6] of the AM2901.
//
// Turns the octal destination code into the controls of the storage and
// output paths, following the destination table:
//   QREG  Q <- F               Y = F
//   NOP   nothing stored       Y = F
//   RAMA  B <- F               Y = A
//   RAMF  B <- F               Y = F
//   RAMQD B <- F/2, Q <- Q/2   Y = F   RAM0 and Q0 pins drive out
//   RAMD  B <- F/2             Y = F   RAM0 and Q0 pins drive out
//   RAMQU B <- 2F,  Q <- 2Q    Y = F   RAM3 and Q3 pins drive out
//   RAMU  B <- 2F              Y = F   RAM3 and Q3 pins drive out
// On a down shift the RAM3/Q3 pins are inputs, on an up shift RAM0/Q0 are;
// pins the table marks "don't care" are left as inputs. Combinational.
module am2901_dest_decode
  import am2901_pkg::*;
(
  input  dest_e      dest,  // I[8:6]
  output dest_ctrl_t ctrl   // decoded controls
);
  always_comb begin
    ctrl = '0;
    unique case (dest)
      DST_QREG: ctrl.q_we = 1'b1;
      DST_NOP:  ;
      DST_RAMA: begin ctrl.ram_we = 1'b1; ctrl.y_sel_a = 1'b1; end
      DST_RAMF: ctrl.ram_we = 1'b1;
      DST_RAMQD, DST_RAMD: begin
        ctrl.ram_we    = 1'b1;
        ctrl.ram_shift = SH_DOWN;
        ctrl.ram0_oe   = 1'b1;
        ctrl.q0_oe     = 1'b1;
        if (dest == DST_RAMQD) begin
          ctrl.q_we    = 1'b1;
          ctrl.q_shift = SH_DOWN;
        end
      end
      DST_RAMQU, DST_RAMU: begin
        ctrl.ram_we    = 1'b1;
        ctrl.ram_shift = SH_UP;
        ctrl.ram3_oe   = 1'b1;
        ctrl.q3_oe     = 1'b1;
        if (dest == DST_RAMQU) begin
          ctrl.q_we    = 1'b1;
          ctrl.q_shift = SH_UP;
        end
      end
      default: ;
    endcase
  end
endmodule
