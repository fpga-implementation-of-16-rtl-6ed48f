# A 16-bit RSA cryptosystem for text messages

This is a complete RSA system in synthesizable SystemVerilog, small enough to
follow in simulation. It generates its own key pair from three seed words. It
then encrypts a short text message held in a word memory and decrypts it
again. The primes come from a 16-bit LFSR and are checked by trial division.
The modulus and the totient come from a Booth multiplier, and the private
exponent from an extended Euclidean unit. Encryption and decryption both use
left-to-right binary modular exponentiation.

The primes are 16-bit numbers, so the modulus is at most 32 bits. That is a
teaching-scale key: it shows how an RSA datapath and its control fit together.
It does **not** protect anything. Anyone can factor a 32-bit modulus in
microseconds.

With the example seeds (P = 101, Q = 401, E = 17), the system turns the message
`NAGARJUNA COLLEGE` into the ciphertext words
`3103 2229 34520 34349 25848 17985 1373 3478 2463` and back again.

## How a host drives it

Everything goes through one 64-word memory (32-bit words). The host writes it
through `host_we/host_addr/host_wdata` and reads it through `host_rdata`.

| word | content |
|------|---------|
| 0 | Seed_P (low 16 bits used) |
| 1 | Seed_Q (low 16 bits used) |
| 2 | Seed_E (first candidate for the public exponent) |
| 3 | En_RSA: a 0→1 change of bit 0 starts key generation |
| 4 | En_Encryption: a 0→1 change of bit 0 encrypts words 6..15 into 17..26 |
| 5 | En_Decryption: a 0→1 change of bit 0 decrypts words 17..26 into 28..37 |
| 6..15 | plaintext, two ASCII characters per word (first character in bits 15:8) |
| 17..26 | ciphertext |
| 28..37 | decrypted plaintext |

Words 16 and 27 are not used. A text with an odd number of characters puts its
last character alone in the low byte. For example, `...EG`, `E` is stored as
`0x4547`, `0x0045`.

The usual sequence is:

1. Write the seeds and the message.
2. Pulse bit 0 of word 3 (write 1, then 0).
3. Pulse word 4, then word 5.

Only the rising edge counts, so an enable left at 1 does not repeat its
operation. Requests are remembered and served one at a time, key generation
first. An encryption or decryption request made before any key exists waits
until key generation succeeds. A request made while an older key pair is valid
runs at once with that pair.

Status outputs:

- `busy` is high while any operation runs.
- `done` goes high when the last requested operation has finished, and low when
  the next one starts.
- `keys_valid` says that a key pair exists.
- `key_error` says that the last key generation found no usable E.

The whole key set (P, Q, N, phi, E, D) is also on the `keys` output, a packed
`rsa_keys_t` struct.

All blocks share one clock and an active-low asynchronous reset. Reset clears
the memory too.

## Key generation (`rsa_keygen`)

Key generation is the hardest part to follow, because four units take turns
under one state machine.

1. **Prime P.** The LFSR is loaded with Seed_P, and the seed itself is the first
   candidate. The prime detector tests it. For each rejected candidate the LFSR
   steps once and the new value is tested. The first prime becomes P.
2. **Prime Q.** The same search, starting from Seed_Q.
3. **N and phi.** The Booth multiplier computes N = P·Q, then phi = (P−1)(Q−1).
4. **E and D.** E starts at Seed_E; a seed of 0 or 1 is raised to 2. If
   E ≥ phi, key generation stops with `key_error`. Otherwise the extended
   Euclidean unit runs on a = phi, b = E:
   - If the gcd is not 1, E is incremented and the check repeats.
   - If the gcd is 1, the coefficient `last_y` of b is the inverse of E modulo
     phi. It may be negative, in which case D = last_y + phi, otherwise
     D = last_y.

### LFSR (`lfsr16`)

The polynomial is x^16 + x^14 + x^13 + x^11 + 1 in Fibonacci form. The register
shifts right; bits 0, 2, 3 and 5 are combined and the result enters at
bit 15. The combination is an **XNOR**: this form reproduces the reference
sequence 25679 → 12839 → 6419 (XOR feedback gives 45607 as the second value)
and is maximal length, with period 65535. All ones is the lock-up state, so a seed of 65535 must not be
used.

### Prime detector (`prime_detector`)

The detector divides the number by 3, 5, 7, … up to half the number (`mod`).
Any zero remainder means "not prime"; passing the limit means "prime". Each
division uses a 16-bit restoring divider at one bit per clock. The `mem_c`
output shows the current divisor. For 13009 the limit is 6504, and the prime
flag appears when `mem_c` reaches 6505.

The bound n/2, rather than √n, is deliberate: it matches the reference
behaviour. It makes large primes slow: a test costs about 19 clocks per odd
divisor, roughly 62k clocks for 13009 and up to about 310k clocks near 65535.
Numbers below 2 and even numbers are answered in one clock.

### Booth multiplier (`booth_multiplier`)

This is a radix-2 Booth multiplier, W = 32 by default: 32 × 32 bits signed, with
a 64-bit product. It does one Booth step per clock, so a product takes 32 clocks
after `start`. The accumulator has one guard bit, so the most negative
multiplicand also works. Key generation zero-extends the 16-bit P and Q, so
they are always positive operands. A 16-bit signed Booth multiplier could not
take primes above 32767.

### Extended Euclid (`ext_euclid`)

The unit runs the classic iteration with x, y, last_x and last_y. Each round
divides a_reg by b_reg on a sequential divider (W clocks), then updates:

    (a, b) ← (b, a mod b)
    x ← last_x − q·x
    y ← last_y − q·y

It starts from x = 0, y = 1, last_x = 1, last_y = 0. The coefficients never
exceed the inputs in magnitude, so they are W+1-bit signed values. The products
q·x and q·y are formed modulo 2^(W+1), which still gives the exact
differences. For a = 120, b = 23 the quotients are 5, 4, 1, 1, 2 and the
result is last_x = −9, last_y = 47.

## Encryption and decryption (`mod_exp`, `mod_mult`)

The two engines are separate instances of `mod_exp`:

- the encryption engine uses (E, N);
- the decryption engine uses (D, N).

`mod_exp` scans all 32 exponent bits from the top. For each bit it squares the
residue; if the bit is one it then multiplies the residue by the base.

Each of those steps is one `mod_mult`, an interleaved shift-add modular
multiplier that takes one bit of a per clock:

    r ← 2r + a_i·b, then subtract n or 2n

After each step r is again below n, and after 32 clocks r = a·b mod n. So a
modular multiplication costs 34 clocks including its start state. One
exponentiation costs 34 × (32 + number of one bits in the exponent) clocks:

- 1157 clocks for E = 17;
- at most about 2.2k clocks for any 32-bit exponent.

The message must be below N, as RSA requires. With 16-bit messages this holds
whenever N > 65535 or the message is below N. The example's messages (up to
0x554E = 21838) are below N = 40501.

The controller feeds each word of the source area to the engine and writes the
result 11 words further on. It does this for all ten words, one after another.

## Timing

| operation | clocks |
|---|---|
| key generation, seeds 101 / 401 / 17 | 2520 |
| key generation, large composite seeds | up to a few hundred thousand (dominated by prime tests) |
| one word, encryption with E = 17 | 1157 |
| one word, any exponent | ≤ about 2.2k |
| whole 10-word area | 10 × per-word time + a few clocks per word |

The reference implementation reported 1804 slices and 61.3 MHz on a Spartan-6
XC6SLX16. This RTL was not put through that flow, and its area differs:

- the 64 × 32 memory is built from resettable flip-flops;
- the Euclid unit has two 33-bit multipliers.

## Where this design departs from the reference, and why

- **LFSR feedback** is XNOR at bits 0, 2, 3, 5. Only the polynomial and a
  three-value sequence were given; this form reproduces the sequence and is
  maximal length.
- **Prime detection** is odd trial division up to n/2. The algorithm was called
  a sieve of Eratosthenes, but the published waveform shows this divisor
  counter and limit.
- **Decrypted text starts at word 28**, as shown in the reference waveform.
  One description gives 27..36 instead. Word 28 keeps the same spacing of 11
  words as plaintext → ciphertext.
- **P = 101, Q = 401** (from Seed_P = 101, Seed_Q = 401), as in the waveforms.
  One description swaps the two names; N and phi are the same either way.
- **Extended Euclid runs with a = phi and b = E**, and D is the coefficient of b.
  One description names the inputs the other way round, but its own numbers
  (a = 120, b = 23, result 47 = 23⁻¹ mod 120) only work this way.
- **32-bit keys.** N, phi, E, D and the memory words are 32 bits, so that any two
  16-bit primes work. The reference example fits in 16 bits.
- **This design's own choices**, not given by the reference:
  - what happens when Seed_E is rejected: increment, raise to 2, error at phi;
  - the correction of a negative D;
  - queuing of requests and the `done` rule;
  - the memory depth, two-port structure and reset;
  - all handshakes (`start` / `busy` / `done` pulses);
  - the dividers and the modular multiplier structure.
- **Not covered:** P = Q is not rejected. A 65535 seed locks the LFSR.
  Messages must be below N.

## Files

`rtl/`:

- `rsa_pkg.sv`: widths, the memory map and the `rsa_keys_t` struct.
- `rsa_top.sv`: the system.
- `rsa_mem.sv`: the word memory.
- `rsa_controller.sv`: the sequencer.
- `rsa_keygen.sv`: key generation.
- `lfsr16.sv`, `prime_detector.sv`, `booth_multiplier.sv`, `ext_euclid.sv`:
  the key-generation units.
- `mod_exp.sv`, `mod_mult.sv`: the engines.
- `divmod_seq.sv`: the sequential divider shared by the prime detector and
  Euclid.

Every file opens with a description of its interface and timing.

`tb/`: one self-checking testbench per module, named `tb_<module>.sv`. The
shared divider has none of its own; the prime-detector and Euclid testbenches
cover it. Each
prints `TB_RESULT checks=N failures=M`, and each has a watchdog.

- `tb_rsa_top` runs the whole system at its default sizes:
  1. the example message with its published keys and ciphertexts;
  2. a second key set from composite seeds, which makes the LFSR search, the
     E rejection and the negative-D correction happen;
  3. a key error.

  It counts each of these mechanisms and fails if one never occurs. It takes
  about 221k clocks.
- `tb_rsa_keygen` also tries every prime from 2 to 256 as Seed_E; those
  are the values the public exponent is meant to be picked from.
- The unit testbenches compare against independent models: a reference LFSR
  and its full period, reference primality, native multiplication, the Bezout
  identity, and 64-bit modular arithmetic.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb \
        rtl/rsa_pkg.sv tb/tb_rsa_top.sv --top-module tb_rsa_top
    ./obj_dir/Vtb_rsa_top

Replace `tb_rsa_top` by any other testbench name to run a unit test. The
testbenches initialise everything they read, so they also run on two-state
simulators with random initial values.
